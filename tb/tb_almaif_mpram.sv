// tb_almaif_mpram: self-checking test of the multi-port RAM (host port plus
// three core ports). Random byte-masked reads and writes on all ports at
// once are compared with a model: one-cycle read latency, read data held
// while a port is idle, reads see the word from before the cycle's writes,
// and on a write collision the highest-numbered port wins per byte.
`timescale 1ns / 1ps
module tb_almaif_mpram;
  localparam int NP = 4, W = 32, D = 64;
  logic clk = 0;
  logic [NP-1:0] en, we;
  logic [NP-1:0][5:0] addr;
  logic [NP-1:0][3:0] be;
  logic [NP-1:0][W-1:0] wdata, rdata;
  logic [W-1:0] model [D];
  logic [W-1:0] expd [NP];
  logic seen [NP];
  int checks = 0, failures = 0, collisions = 0;

  always #5 clk = ~clk;

  almaif_mpram #(.NP(NP), .WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = '0; we = '0; addr = '0; be = '0; wdata = '0;
    foreach (seen[p]) seen[p] = 0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      en = '0; we = '0;
      en[i % NP] = 1; we[i % NP] = 1; addr[i % NP] = 6'(i); be[i % NP] = 4'hF;
      wdata[i % NP] = $urandom; model[i] = wdata[i % NP];
    end
    @(negedge clk);
    en = '0; we = '0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        en[p] = $urandom_range(0, 3) != 0;
        we[p] = $urandom_range(0, 2) == 0;
        addr[p] = 6'($urandom_range(0, 15));  // small range: collisions happen
        be[p] = 4'($urandom);
        wdata[p] = $urandom;
      end
      for (int p = 0; p < NP; p++) if (en[p]) begin expd[p] = model[addr[p]]; seen[p] = 1; end
      for (int p = 0; p < NP; p++) begin
        if (en[p] && we[p]) begin
          for (int q = p + 1; q < NP; q++) if (en[q] && we[q] && addr[q] == addr[p]) collisions++;
          for (int i = 0; i < 4; i++) if (be[p][i]) model[addr[p]][8*i +: 8] = wdata[p][8*i +: 8];
        end
      end
      @(posedge clk);
      #1;
      for (int p = 0; p < NP; p++) begin
        if (seen[p]) begin
          checks++;
          if (rdata[p] !== expd[p]) begin
            failures++;
            $display("FAIL port %0d c=%0d got %h exp %h", p, c, rdata[p], expd[p]);
          end
        end
      end
    end
    // the collision rule was exercised
    checks++;
    if (collisions == 0) begin failures++; $display("FAIL no write collisions generated"); end
    $display("write collisions: %0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
