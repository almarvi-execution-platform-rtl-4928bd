// almaif_mpram: multi-port RAM for the memories that several cores of a
// multicore accelerator share (instruction, data and parameter memory).
//
// Port 0 serves the host (through the AXI slave), ports 1..NP-1 one core
// each, so every core reaches the shared memory in every cycle without
// arbitration or stalls. Each port behaves like a port of almaif_dpram: an
// enabled read returns data on the next clock edge, the read register holds
// its value while the port is idle, writes are per byte lane, and a read
// returns the word as it was before any write of the same cycle. When
// several ports write the same byte in one cycle, the highest-numbered port
// wins (software is expected to avoid this). Contents are not reset.
//
// That the memories are shared by all cores and reachable by the host
// follows the multicore accelerator organisation; giving each core its own
// port (rather than arbitrating one) is this design's choice, the simplest
// one that keeps the cores free of memory stalls. With NP = 2 it is the same
// memory as almaif_dpram.
module almaif_mpram #(
  parameter int unsigned NP    = 3,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 8192,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned BW   = WIDTH / 8
) (
  input  logic                      clk,
  input  logic [NP-1:0]             en,
  input  logic [NP-1:0]             we,
  input  logic [NP-1:0][AW-1:0]     addr,
  input  logic [NP-1:0][BW-1:0]     be,
  input  logic [NP-1:0][WIDTH-1:0]  wdata,
  output logic [NP-1:0][WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (en[p]) begin
        rdata[p] <= mem[addr[p]];
        if (we[p]) begin
          for (int i = 0; i < BW; i++) if (be[p][i]) mem[addr[p]][8*i +: 8] <= wdata[p][8*i +: 8];
        end
      end
    end
  end

endmodule
