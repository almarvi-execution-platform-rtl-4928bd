// tb_axi_slave_mem: behavioural AXI4-Lite memory slave for testbenches.
// 64 words, address bits [7:2]. AW and W are accepted independently after
// random delays, B and R come after random delays, so the master side sees
// every ordering of handshakes. ID is returned in the upper byte of every
// read so a test can tell which slave answered; accesses counts them.
`timescale 1ns / 1ps
module tb_axi_slave_mem
  import almaif_pkg::*;
#(
  parameter logic [7:0] ID = 8'h00
) (
  input  logic           clk,
  input  logic           rst_n,
  input  axi_lite_req_t  req,
  output axi_lite_resp_t resp
);
  logic [23:0] mem [64];
  bit have_aw, have_w;
  logic [7:2] waddr;
  logic [31:0] wdata;
  int accesses = 0;

  initial begin
    foreach (mem[i]) mem[i] = 0;
    resp = '0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      resp <= '0;
      have_aw = 0;
      have_w  = 0;
    end else begin
      // write address / data
      if (resp.aw_ready && req.aw_valid) begin have_aw = 1; waddr = req.aw_addr[7:2]; end
      if (resp.w_ready && req.w_valid) begin have_w = 1; wdata = req.w_data; end
      resp.aw_ready <= !have_aw && req.aw_valid && ($urandom_range(0, 2) == 0);
      resp.w_ready  <= !have_w && req.w_valid && ($urandom_range(0, 2) == 0);
      if (resp.aw_ready && req.aw_valid) resp.aw_ready <= 1'b0;
      if (resp.w_ready && req.w_valid) resp.w_ready <= 1'b0;
      if (resp.b_valid && req.b_ready) begin
        resp.b_valid <= 1'b0;
        have_aw = 0;
        have_w  = 0;
      end else if (have_aw && have_w && !resp.b_valid && $urandom_range(0, 1)) begin
        mem[waddr] <= wdata[23:0];
        resp.b_valid <= 1'b1;
        resp.b_resp  <= RESP_OKAY;
        accesses++;
      end
      // read
      if (resp.ar_ready && req.ar_valid) begin
        resp.ar_ready <= 1'b0;
        resp.r_data   <= {ID, mem[req.ar_addr[7:2]]};
        resp.r_resp   <= RESP_OKAY;
        resp.r_valid  <= 1'b1;
        accesses++;
      end else begin
        resp.ar_ready <= req.ar_valid && !resp.r_valid && ($urandom_range(0, 2) == 0);
      end
      if (resp.r_valid && req.r_ready) resp.r_valid <= 1'b0;
    end
  end
endmodule
