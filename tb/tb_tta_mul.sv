// tb_tta_mul: self-checking test of the TTA multiplier (latency 3).
// Each product must be absent after 1 and 2 enabled cycles and present
// after 3, with random stalls in between; a pipelined burst checks one
// product per cycle.
`timescale 1ns / 1ps
module tb_tta_mul;
  logic clk = 0, rst_n = 0, en = 0;
  logic o_we = 0, t_we = 0;
  logic [31:0] o_data = 0, t_data = 0, r_data;
  logic [4:0] t_op = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tta_mul dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] exp, string what);
    checks++;
    if (r_data !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, r_data, exp);
    end
  endtask

  task automatic step(int stalls);
    repeat (stalls) begin en = 0; @(negedge clk); end
    en = 1;
    @(negedge clk);
  endtask

  logic [31:0] a, b, prev, exp;
  initial begin
    @(negedge clk);
    rst_n = 1;
    prev = 0;
    for (int i = 0; i < 1000; i++) begin
      a = $urandom; b = $urandom;
      if (i % 5 == 0) b = 32'hFFFF_FFFF;
      exp = a * b;
      o_we = 1; o_data = b; t_we = 1; t_data = a; t_op = 0;
      step(0);
      o_we = 0; t_we = 0;
      check(prev, "after 1 cycle");
      step($urandom_range(0, 2));
      check(prev, "after 2 cycles");
      step($urandom_range(0, 2));
      check(exp, $sformatf("%h * %h", a, b));
      prev = exp;
    end
    o_we = 1; o_data = 3; step(0); o_we = 0;
    t_we = 1;
    for (int i = 1; i <= 3; i++) begin t_data = i; step(0); end
    check(3, "burst 1");
    t_data = 4; step(0);
    t_we = 0;
    check(6, "burst 2");
    step(0); check(9, "burst 3");
    step(0); check(12, "burst 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
