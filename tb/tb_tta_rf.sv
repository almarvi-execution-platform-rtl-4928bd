// tb_tta_rf: self-checking test of the TTA register file.
// Random writes on all ports against a model; reads in the same cycle must
// return the old values; on a write conflict the highest port wins; nothing
// changes while en is low.
`timescale 1ns / 1ps
module tb_tta_rf;
  localparam int NR = 3, NW = 3;
  logic clk = 0, rst_n = 0, en = 0;
  logic [NR-1:0][4:0]  rd_idx;
  logic [NR-1:0][31:0] rd_data;
  logic [NW-1:0]       wr_en;
  logic [NW-1:0][4:0]  wr_idx;
  logic [NW-1:0][31:0] wr_data;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tta_rf #(.W(32), .NREGS(32), .NR(NR), .NW(NW)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_idx = 0; wr_data = 0; rd_idx = 0;
    foreach (model[i]) model[i] = 0;
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      en = ($urandom_range(0, 9) != 0);
      for (int p = 0; p < NW; p++) begin
        wr_en[p]   = $urandom_range(0, 1);
        wr_idx[p]  = (c % 4 == 0) ? 5'd7 : 5'($urandom);
        wr_data[p] = $urandom;
      end
      for (int p = 0; p < NR; p++) rd_idx[p] = 5'($urandom);
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rd_data[p] !== model[rd_idx[p]]) begin
          failures++;
          $display("FAIL cycle %0d port %0d r%0d: got %h expected %h", c, p, rd_idx[p], rd_data[p],
                   model[rd_idx[p]]);
        end
      end
      @(negedge clk);
      if (en) for (int p = 0; p < NW; p++) if (wr_en[p]) model[wr_idx[p]] = wr_data[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
