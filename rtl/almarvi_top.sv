// almarvi_top: programmable-logic side of the heterogeneous accelerator platform.
//
// The host processor (the ARM cores of the Zynq processing system) programs
// and controls every accelerator through one AXI interconnect, on which
// each accelerator is an AlmaIF slave: a uniform window of control
// registers, instruction memory, data memory and parameter memory. A single
// driver can therefore load a kernel, start it, poll for completion and
// read results on any accelerator, whatever its processor.
//
// This configuration follows the prototype: two TTA accelerators
// (almaif_tta_accel, windows at 0x43C0_0000 and 0x43C4_0000) and one
// rho-VEX VLIW accelerator. The rho-VEX core is not part of this RTL: its
// AlmaIF slave port (window 0x43C8_0000) is brought out as rvex_axi_*, to
// be connected to a rho-VEX with AlmaIF support. Each window is
// 2**18 bytes, the accelerator address width of the default TTA. Camera
// input, video DMA and HDMI output of the base platform are outside this
// module; they move frames through DDR, where the host reads them.
//
// Interface: s_axi_* is the slave port driven by the processing system's
// general-purpose AXI master (AXI4-Lite here). tta_running/tta_halted give
// each TTA's run state (halted = kernel executed HALT) for interrupts or
// LEDs. One clock for everything: the prototype ran the TTAs and the
// rho-VEX at different clocks, and clock-domain crossings are not modelled.
module almarvi_top
  import almaif_pkg::*;
#(
  parameter int unsigned N_TTA = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  axi_lite_req_t    s_axi_req,
  output axi_lite_resp_t   s_axi_resp,
  output axi_lite_req_t    rvex_axi_req,
  input  axi_lite_resp_t   rvex_axi_resp,
  output logic [N_TTA-1:0] tta_running,
  output logic [N_TTA-1:0] tta_halted
);

  localparam int unsigned N_SLV = N_TTA + 1;
  localparam int unsigned WIN_W = 18;

  function automatic logic [N_SLV-1:0][31:0] bases();
    for (int i = 0; i < N_SLV; i++) bases[i] = 32'h43C0_0000 + 32'(i) * (32'd1 << WIN_W);
  endfunction

  axi_lite_req_t  [N_SLV-1:0] slv_req;
  axi_lite_resp_t [N_SLV-1:0] slv_resp;

  axi_lite_xbar #(.N_SLV(N_SLV), .WIN_W(WIN_W), .BASE(bases())) u_xbar (
    .clk, .rst_n,
    .m_req(s_axi_req), .m_resp(s_axi_resp),
    .s_req(slv_req), .s_resp(slv_resp)
  );

  for (genvar i = 0; i < N_TTA; i++) begin : g_tta
    almaif_tta_accel #(.DEVICE_ID(32'(i + 1))) u_tta (
      .clk, .rst_n,
      .s_axi_req(slv_req[i]), .s_axi_resp(slv_resp[i]),
      .running(tta_running[i]), .halted(tta_halted[i])
    );
  end

  // rho-VEX accelerator slot: last window.
  assign rvex_axi_req    = slv_req[N_TTA];
  assign slv_resp[N_TTA] = rvex_axi_resp;

endmodule
