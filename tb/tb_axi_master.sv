// tb_axi_master: AXI4-Lite master for testbenches.
//
// Tasks write() and read() run one transaction each. All request signals
// change just after a falling clock edge, and ready/valid are sampled one
// time unit later, so the handshake completes on the following rising edge
// without races against the design's flip-flops. Each task returns the AXI
// response code; nread/nwrite count completed transactions; nerr counts
// non-OKAY responses seen by the helper tasks.
//
// Helper tasks drive an AlmaIF accelerator at a given base address, as a
// host driver would: wr32/rd32, load a program into IMEM (two 32-bit
// writes per 64-bit instruction), copy bytes to and from a memory section,
// and start a kernel and poll its status until the core has halted.
`timescale 1ns / 1ps
module tb_axi_master
  import almaif_pkg::*;
(
  input  logic           clk,
  output axi_lite_req_t  req,
  input  axi_lite_resp_t resp
);

  int unsigned nread  = 0;
  int unsigned nwrite = 0;

  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       input logic [3:0] strb, output logic [1:0] bresp);
    bit aw_done, w_done, a_rdy, w_rdy, b_vld;
    @(negedge clk);
    req.aw_addr  = addr;
    req.aw_valid = 1'b1;
    req.w_data   = data;
    req.w_strb   = strb;
    req.w_valid  = 1'b1;
    aw_done = 0;
    w_done  = 0;
    while (!(aw_done && w_done)) begin
      #1;
      a_rdy = resp.aw_ready && req.aw_valid;
      w_rdy = resp.w_ready && req.w_valid;
      @(negedge clk);
      if (a_rdy) begin aw_done = 1; req.aw_valid = 1'b0; end
      if (w_rdy) begin w_done = 1;  req.w_valid  = 1'b0; end
    end
    req.b_ready = 1'b1;
    b_vld = 0;
    while (!b_vld) begin
      #1;
      b_vld = resp.b_valid;
      bresp = resp.b_resp;
      @(negedge clk);
    end
    req.b_ready = 1'b0;
    nwrite++;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data, output logic [1:0] rresp);
    bit a_rdy, r_vld;
    @(negedge clk);
    req.ar_addr  = addr;
    req.ar_valid = 1'b1;
    a_rdy = 0;
    while (!a_rdy) begin
      #1;
      a_rdy = resp.ar_ready;
      @(negedge clk);
    end
    req.ar_valid = 1'b0;
    req.r_ready  = 1'b1;
    r_vld = 0;
    while (!r_vld) begin
      #1;
      r_vld = resp.r_valid;
      data  = resp.r_data;
      rresp = resp.r_resp;
      @(negedge clk);
    end
    req.r_ready = 1'b0;
    nread++;
  endtask

  int unsigned nerr = 0;

  task automatic wr32(input logic [31:0] addr, input logic [31:0] data);
    logic [1:0] r;
    write(addr, data, 4'hF, r);
    if (r != RESP_OKAY) nerr++;
  endtask

  task automatic rd32(input logic [31:0] addr, output logic [31:0] data);
    logic [1:0] r;
    read(addr, data, r);
    if (r != RESP_OKAY) nerr++;
  endtask

  task automatic load_program(input logic [31:0] imem_base, input logic [63:0] prog[$]);
    foreach (prog[i]) begin
      wr32(imem_base + 32'(8 * i), prog[i][31:0]);
      wr32(imem_base + 32'(8 * i) + 4, prog[i][63:32]);
    end
  endtask

  // bytes are packed little-endian, 4 per word; n must be a multiple of 4
  task automatic put_bytes(input logic [31:0] addr, input byte unsigned b[], input int n);
    for (int i = 0; i < n; i += 4) wr32(addr + 32'(i), {b[i+3], b[i+2], b[i+1], b[i]});
  endtask

  task automatic get_bytes(input logic [31:0] addr, ref byte unsigned b[], input int n);
    logic [31:0] d;
    for (int i = 0; i < n; i += 4) begin
      rd32(addr + 32'(i), d);
      {b[i+3], b[i+2], b[i+1], b[i]} = d;
    end
  endtask

  // RESET, CONTINUE, then poll STATUS until HALTED (or max_polls).
  task automatic run_kernel(input logic [31:0] ctrl_base, input int max_polls,
                            output int polls, output logic [31:0] status);
    wr32(ctrl_base + 32'(REG_CMD), 32'(1 << CMD_RESET));
    wr32(ctrl_base + 32'(REG_START_ADDR), 0);
    wr32(ctrl_base + 32'(REG_CMD), 32'(1 << CMD_CONTINUE));
    polls = 0;
    do begin
      rd32(ctrl_base + 32'(REG_STATUS), status);
      polls++;
    end while (!status[ST_HALTED] && polls < max_polls);
  endtask

endmodule
