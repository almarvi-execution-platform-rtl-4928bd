// tta_mul: 32x32-bit multiplier function unit of the TTA core, latency 3.
//
// Ports as in every TTA function unit: operand O, trigger T (opcode 0 =
// MUL, low W bits of T*O), result R. A move into T starts a multiplication;
// R holds the product three enabled cycles later and keeps it until the
// next product. Stage 1 registers the operands, stage 2 forms and registers
// the full product, stage 3 registers R. The unit freezes while en is low.
// The width and the 3-cycle latency follow the prototype's multiplier; the
// pipeline split is this design's own.
module tta_mul #(
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

  logic [W-1:0] o_reg, s1_a, s1_b, s2_p;
  logic         s1_valid, s2_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_reg    <= '0;
      s1_a     <= '0;
      s1_b     <= '0;
      s2_p     <= '0;
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
      r_data   <= '0;
    end else if (en) begin
      if (o_we) o_reg <= o_data;
      s1_valid <= t_we && (t_op == 5'd0);
      if (t_we) begin
        s1_a <= t_data;
        s1_b <= o_we ? o_data : o_reg;
      end
      s2_valid <= s1_valid;
      if (s1_valid) s2_p <= s1_a * s1_b;
      if (s2_valid) r_data <= s2_p;
    end
  end

endmodule
