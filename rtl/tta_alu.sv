// tta_alu: arithmetic-logic function unit of the TTA core, latency 2.
//
// The unit has an operand port (O), a trigger port (T, with an opcode) and a
// result port (R), as every TTA function unit has. A move into O only stores
// the operand. A move into T starts the operation on (T, O); a move into O
// and into T in the same cycle uses the new O value. The result is readable
// from R by moves two enabled cycles after the trigger, and R keeps its
// value until the next result arrives.
//
// Timing: stage 1 registers the operands and opcode, stage 2 computes and
// registers R. The whole unit freezes while en is low (the core's global
// lock). The 2-cycle latency follows the prototype ALUs; the operation set
// (add/sub, logic, shifts, compares, sign extension, min/max) is this
// design's own choice.
module tta_alu
  import tta_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         o_we,
  input  logic [W-1:0] o_data,
  input  logic         t_we,
  input  logic [W-1:0] t_data,
  input  logic [4:0]   t_op,
  output logic [W-1:0] r_data
);

  logic [W-1:0] o_reg;
  logic [W-1:0] s1_a, s1_b;
  alu_op_e      s1_op;
  logic         s1_valid;
  logic [W-1:0] res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_reg    <= '0;
      s1_a     <= '0;
      s1_b     <= '0;
      s1_op    <= ALU_ADD;
      s1_valid <= 1'b0;
      r_data   <= '0;
    end else if (en) begin
      if (o_we) o_reg <= o_data;
      s1_valid <= t_we;
      if (t_we) begin
        s1_a  <= t_data;
        s1_b  <= o_we ? o_data : o_reg;
        s1_op <= alu_op_e'(t_op);
      end
      if (s1_valid) r_data <= res;
    end
  end

  always_comb begin
    logic [4:0] sh;
    sh = s1_b[4:0];
    unique case (s1_op)
      ALU_ADD:  res = s1_a + s1_b;
      ALU_SUB:  res = s1_a - s1_b;
      ALU_AND:  res = s1_a & s1_b;
      ALU_IOR:  res = s1_a | s1_b;
      ALU_XOR:  res = s1_a ^ s1_b;
      ALU_SHL:  res = s1_a << sh;
      ALU_SHR:  res = W'($signed(s1_a) >>> sh);
      ALU_SHRU: res = s1_a >> sh;
      ALU_EQ:   res = W'(s1_a == s1_b);
      ALU_GT:   res = W'($signed(s1_a) > $signed(s1_b));
      ALU_GTU:  res = W'(s1_a > s1_b);
      ALU_SXQW: res = W'($signed(s1_a[7:0]));
      ALU_SXHW: res = W'($signed(s1_a[15:0]));
      ALU_MIN:  res = ($signed(s1_a) < $signed(s1_b)) ? s1_a : s1_b;
      ALU_MAX:  res = ($signed(s1_a) > $signed(s1_b)) ? s1_a : s1_b;
      ALU_MINU: res = (s1_a < s1_b) ? s1_a : s1_b;
      ALU_MAXU: res = (s1_a > s1_b) ? s1_a : s1_b;
      default:  res = '0;
    endcase
  end

endmodule
