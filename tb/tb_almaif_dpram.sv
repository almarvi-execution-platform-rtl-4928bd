// tb_almaif_dpram: self-checking test of the dual-port RAM.
// Random byte-masked writes and reads on both ports against a model, with a
// one-cycle read latency, held read data while a port is idle, and
// read-before-write behaviour on the same word.
`timescale 1ns / 1ps
module tb_almaif_dpram;
  localparam int W = 32, D = 64;
  logic clk = 0;
  logic a_en, a_we, b_en, b_we;
  logic [5:0] a_addr, b_addr;
  logic [3:0] a_be, b_be;
  logic [W-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [W-1:0] model [D];
  logic [W-1:0] exp_a, exp_b;
  bit seen_a = 0, seen_b = 0;  // the port has read since the fill phase
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  almaif_dpram #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] merge(logic [W-1:0] old, logic [W-1:0] d, logic [3:0] be);
    for (int i = 0; i < 4; i++) if (be[i]) old[8*i +: 8] = d[8*i +: 8];
    return old;
  endfunction

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0;
    a_be = 0; b_be = 0; a_wdata = 0; b_wdata = 0;
    // fill through port A
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 6'(i); a_be = 4'hF; a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk);
    a_en = 0; a_we = 0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      a_en = $urandom_range(0, 3) != 0; a_we = $urandom_range(0, 1); a_addr = 6'($urandom);
      a_be = 4'($urandom); a_wdata = $urandom;
      b_en = $urandom_range(0, 3) != 0; b_we = $urandom_range(0, 1); b_addr = 6'($urandom);
      b_be = 4'($urandom); b_wdata = $urandom;
      if (b_we && a_we && a_addr == b_addr) b_we = 0;  // no write-write collisions
      if (a_en) begin exp_a = model[a_addr]; seen_a = 1; end
      if (b_en) begin exp_b = model[b_addr]; seen_b = 1; end
      if (a_en && a_we) model[a_addr] = merge(model[a_addr], a_wdata, a_be);
      if (b_en && b_we) model[b_addr] = merge(model[b_addr], b_wdata, b_be);
      @(posedge clk);
      #1;
      if (seen_a) begin
        checks++;
        if (a_rdata !== exp_a) begin failures++; $display("FAIL A c=%0d got %h exp %h", c, a_rdata, exp_a); end
      end
      if (seen_b) begin
        checks++;
        if (b_rdata !== exp_b) begin failures++; $display("FAIL B c=%0d got %h exp %h", c, b_rdata, exp_b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
