// almaif_dpram: dual-port RAM used for the accelerator's instruction, data,
// parameter and scratchpad memories.
//
// Port A serves the host (through the AXI slave), port B the core. Both ports
// are synchronous: an enabled read returns data on the next clock edge, and
// the read register holds its value while the port is not enabled, so a
// stalled core keeps seeing its last fetch or load. Writes are per byte
// lane. A read and a write to the same word on different ports in one cycle
// return the old word. Memory contents are not reset.
//
// That every memory has a host port and a core port follows the accelerator
// organisation; the synchronous one-cycle read is this design's choice and
// maps onto FPGA block RAM.
module almaif_dpram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned BW   = WIDTH / 8
) (
  input  logic             clk,
  // port A (host)
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [BW-1:0]    a_be,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  // port B (core)
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [BW-1:0]    b_be,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) begin
        for (int i = 0; i < BW; i++) if (a_be[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      end
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) begin
        for (int i = 0; i < BW; i++) if (b_be[i]) mem[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
      end
    end
  end

endmodule
