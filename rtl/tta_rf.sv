// tta_rf: register file of the TTA core (general 32x32 and boolean 2x1).
//
// NREGS registers of W bits with NR asynchronous read ports and NW write
// ports, one per transport bus. All reads of a cycle see the values from
// before that cycle's writes, as the moves of one TTA instruction happen
// together. When two write ports name the same register in one cycle the
// higher-numbered port wins. Writes happen at the clock edge while en is
// high; reset clears every register. The sizes 32x32 and 2x1 follow the
// prototype core; the port counts and the reset are this design's choice.
module tta_rf #(
  parameter int unsigned W     = 32,
  parameter int unsigned NREGS = 32,
  parameter int unsigned NR    = 3,
  parameter int unsigned NW    = 3,
  localparam int unsigned IW   = (NREGS > 1) ? $clog2(NREGS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [NR-1:0][IW-1:0]  rd_idx,
  output logic [NR-1:0][W-1:0]   rd_data,
  input  logic [NW-1:0]          wr_en,
  input  logic [NW-1:0][IW-1:0]  wr_idx,
  input  logic [NW-1:0][W-1:0]   wr_data
);

  logic [NREGS-1:0][W-1:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else if (en) begin
      for (int p = 0; p < NW; p++) begin
        if (wr_en[p] && (32'(wr_idx[p]) < NREGS)) regs[wr_idx[p]] <= wr_data[p];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NR; p++) begin
      rd_data[p] = (32'(rd_idx[p]) < NREGS) ? regs[rd_idx[p]] : '0;
    end
  end

endmodule
