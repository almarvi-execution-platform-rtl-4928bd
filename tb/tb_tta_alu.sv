// tb_tta_alu: self-checking test of the TTA ALU.
// Random operations and operands are triggered; the result port is checked
// one enabled cycle after the trigger (must still hold the previous result)
// and two enabled cycles after (must hold the new one). Random stall cycles
// (en low) check that the unit freezes. Operand-and-trigger in the same
// cycle and back-to-back triggers are covered.
`timescale 1ns / 1ps
module tb_tta_alu;
  import tta_pkg::*;

  logic clk = 0, rst_n = 0, en = 0;
  logic o_we = 0, t_we = 0;
  logic [31:0] o_data = 0, t_data = 0, r_data;
  logic [4:0] t_op = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tta_alu dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(alu_op_e op, logic [31:0] a, logic [31:0] b);
    case (op)
      ALU_ADD:  return a + b;
      ALU_SUB:  return a - b;
      ALU_AND:  return a & b;
      ALU_IOR:  return a | b;
      ALU_XOR:  return a ^ b;
      ALU_SHL:  return a << b[4:0];
      ALU_SHR:  return $signed(a) >>> b[4:0];
      ALU_SHRU: return a >> b[4:0];
      ALU_EQ:   return {31'd0, a == b};
      ALU_GT:   return {31'd0, $signed(a) > $signed(b)};
      ALU_GTU:  return {31'd0, a > b};
      ALU_SXQW: return {{24{a[7]}}, a[7:0]};
      ALU_SXHW: return {{16{a[15]}}, a[15:0]};
      ALU_MIN:  return $signed(a) < $signed(b) ? a : b;
      ALU_MAX:  return $signed(a) > $signed(b) ? a : b;
      ALU_MINU: return a < b ? a : b;
      ALU_MAXU: return a > b ? a : b;
      default:  return 0;
    endcase
  endfunction

  task automatic check(logic [31:0] exp, string what);
    checks++;
    if (r_data !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, r_data, exp);
    end
  endtask

  // one enabled cycle, optionally preceded by stall cycles
  task automatic step(int stalls);
    repeat (stalls) begin
      en = 0;
      @(negedge clk);
    end
    en = 1;
    @(negedge clk);
  endtask

  logic [31:0] prev, a, b, exp;
  alu_op_e op;

  initial begin
    @(negedge clk);
    rst_n = 1;
    prev = 0;
    for (int i = 0; i < 2000; i++) begin
      a  = $urandom;
      b  = (i % 3 == 0) ? a : $urandom;
      if (i % 7 == 0) b = $urandom_range(0, 40);
      op = alu_op_e'($urandom_range(0, 16));
      exp = model(op, a, b);
      // operand first (or together with the trigger)
      if (i % 2 == 0) begin
        o_we = 1; o_data = b; t_we = 0;
        step($urandom_range(0, 1));
        o_we = 0;
      end else begin
        o_we = 1; o_data = b;
      end
      t_we = 1; t_data = a; t_op = op;
      step(0);
      t_we = 0; o_we = 0;
      o_data = $urandom; t_data = $urandom;  // must be ignored
      check(prev, "result changed after 1 cycle");
      step($urandom_range(0, 2));
      check(exp, $sformatf("op %s a=%h b=%h", op.name(), a, b));
      prev = exp;
    end
    // back-to-back triggers: results appear one per cycle
    o_we = 1; o_data = 32'd10; step(0); o_we = 0;
    t_we = 1; t_op = ALU_ADD; t_data = 1; step(0);
    t_data = 2; step(0);
    check(11, "pipelined 1");
    t_data = 3; step(0);
    check(12, "pipelined 2");
    t_we = 0; step(0);
    check(13, "pipelined 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
