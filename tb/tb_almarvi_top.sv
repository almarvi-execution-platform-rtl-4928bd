// tb_almarvi_top: end-to-end test of the platform at its default parameters.
//
// The host side (AXI master) runs the two-filter application: a Sobel
// filter followed by a 3x3 box blur, each on its own accelerator. Two
// frames are processed as a pipeline: TTA0 filters frame 0 (Sobel); then
// TTA1 blurs that result while TTA0 already filters frame 1; then TTA1
// blurs frame 1. The host moves images between the accelerators' data
// memories over AXI. A behavioural memory slave stands in for the rho-VEX
// accelerator on its window. The result of every frame is compared, pixel
// by pixel, with blur(sobel(frame)) computed here.
//
// Mechanisms that must each happen at least once (counted, a failure if
// never seen): both accelerators running in the same cycle, a kernel
// halting, a breakpoint hit, a single step, a RESET command, an access
// routed to the rho-VEX window, a DECERR for an unmapped address, and each
// accelerator answering with its own device ID.
`timescale 1ns / 1ps
module tb_almarvi_top;
  import almaif_pkg::*;
  import tta_pkg::*;
  import tb_tta_asm_pkg::*;

  localparam logic [31:0] TTA0 = 32'h43C0_0000;
  localparam logic [31:0] TTA1 = 32'h43C4_0000;
  localparam logic [31:0] RVEX = 32'h43C8_0000;
  localparam logic [31:0] IMEM = 32'(SEC_IMEM) << 16;
  localparam logic [31:0] DMEM = 32'(SEC_DMEM) << 16;
  localparam logic [31:0] PMEM = 32'(SEC_PMEM) << 16;
  localparam int W = 24, H = 12;
  localparam int IN_OFS = 32'h0, OUT_OFS = 32'h1000;

  logic clk = 0, rst_n = 0;
  axi_lite_req_t s_axi_req, rvex_axi_req;
  axi_lite_resp_t s_axi_resp, rvex_axi_resp;
  logic [1:0] tta_running, tta_halted;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  almarvi_top dut (.*);
  tb_axi_master bfm (.clk, .req(s_axi_req), .resp(s_axi_resp));
  tb_axi_slave_mem #(.ID(8'hBE)) rvex (.clk, .rst_n, .req(rvex_axi_req), .resp(rvex_axi_resp));

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // event counters
  int n_both = 0, n_halt = 0, n_bp = 0, n_step = 0, n_reset = 0, n_rvex = 0, n_decerr = 0, n_id = 0;
  logic [1:0] halted_q = 0;
  // counted only out of reset: before the first clock edge of reset the
  // outputs still hold their power-up values
  always @(posedge clk) begin
    if (rst_n) begin
      if (tta_running == 2'b11) n_both++;
      for (int i = 0; i < 2; i++) if (tta_halted[i] && !halted_q[i]) n_halt++;
    end
    halted_q <= rst_n ? tta_halted : 2'b00;
  end

  TtaAsm sobel_k, blur_k;
  byte unsigned frame [2][];
  byte unsigned mid[], res[], zero[];

  task automatic setup(logic [31:0] base, int in_ofs, int out_ofs);
    bfm.wr32(base + PMEM + 0, W);
    bfm.wr32(base + PMEM + 4, H);
    bfm.wr32(base + PMEM + 8, CORE_DMEM + in_ofs);
    bfm.wr32(base + PMEM + 12, CORE_DMEM + out_ofs);
    bfm.put_bytes(base + DMEM + out_ofs, zero, W * H);
  endtask

  task automatic start(logic [31:0] base);
    bfm.wr32(base + REG_CMD, 32'(1 << CMD_RESET));
    n_reset++;
    bfm.wr32(base + REG_START_ADDR, 0);
    bfm.wr32(base + REG_CMD, 32'(1 << CMD_CONTINUE));
  endtask

  task automatic wait_halt(logic [31:0] base);
    logic [31:0] st;
    do bfm.rd32(base + REG_STATUS, st); while (!st[ST_HALTED]);
  endtask

  task automatic check_frame(int f, byte unsigned got[]);
    byte unsigned s[];
    int errs;
    s = new[W * H];
    foreach (s[i]) s[i] = 0;
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++) s[y * W + x] = ref_sobel(frame[f], W, x, y);
    errs = 0;
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++) begin
        checks++;
        if (got[y * W + x] != ref_blur(s, W, x, y)) begin
          errs++;
          failures++;
          if (errs < 5) $display("FAIL frame %0d pixel (%0d,%0d): got %0d expected %0d", f, x, y,
                                 got[y * W + x], ref_blur(s, W, x, y));
        end
      end
  endtask

  logic [31:0] d, st;
  logic [1:0] r;
  int t0;

  initial begin
    for (int f = 0; f < 2; f++) begin
      frame[f] = new[W * H];
      foreach (frame[f][i]) frame[f][i] = byte'($urandom);
    end
    mid = new[W * H];
    res = new[W * H];
    zero = new[W * H];
    foreach (zero[i]) zero[i] = 0;
    sobel_k = new(); build_kernel(sobel_k, 1'b1);
    blur_k  = new(); build_kernel(blur_k, 1'b0);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // discover the devices
    bfm.rd32(TTA0 + REG_DEVICE_ID, d); if (d == 1) n_id++;
    bfm.rd32(TTA1 + REG_DEVICE_ID, d); if (d == 2) n_id++;
    bfm.rd32(TTA1 + REG_DEV_CLASS, d); chk(d, DEV_CLASS_TTA, "TTA1 device class");
    // the rho-VEX window reaches the external port
    bfm.wr32(RVEX + 32'h10, 32'h00ABCDEF);
    bfm.rd32(RVEX + 32'h10, d);
    chk(d, 32'hBEABCDEF, "rho-VEX window read");
    if (rvex.accesses == 2) n_rvex++;
    // unmapped address
    bfm.read(32'h43CC_0000, d, r);
    if (r == RESP_DECERR) n_decerr++;

    bfm.load_program(TTA0 + IMEM, sobel_k.prog);
    bfm.load_program(TTA1 + IMEM, blur_k.prog);

    // frame 0: Sobel on TTA0
    setup(TTA0, IN_OFS, OUT_OFS);
    bfm.put_bytes(TTA0 + DMEM + IN_OFS, frame[0], W * H);
    start(TTA0);
    wait_halt(TTA0);
    bfm.get_bytes(TTA0 + DMEM + OUT_OFS, mid, W * H);

    // frame 0 blur on TTA1 while TTA0 filters frame 1
    setup(TTA1, IN_OFS, OUT_OFS);
    bfm.put_bytes(TTA1 + DMEM + IN_OFS, mid, W * H);
    // TTA1 runs to a breakpoint first, takes one step, then continues
    bfm.wr32(TTA1 + REG_CMD, 32'(1 << CMD_RESET));
    n_reset++;
    bfm.wr32(TTA1 + REG_BP_ADDR0, 70);
    bfm.wr32(TTA1 + REG_BP_ENABLE, 1);
    bfm.wr32(TTA1 + REG_CMD, 32'(1 << CMD_CONTINUE));
    do bfm.rd32(TTA1 + REG_STATUS, st); while (!st[ST_BREAK]);
    bfm.rd32(TTA1 + REG_PC, d);
    if (st[ST_BP_HIT] && d == 70) n_bp++;
    bfm.wr32(TTA1 + REG_CMD, 32'(1 << CMD_STEP));
    bfm.rd32(TTA1 + REG_PC, d);
    if (d == 71) n_step++;
    bfm.wr32(TTA1 + REG_BP_ENABLE, 0);
    bfm.wr32(TTA1 + REG_CMD, 32'(1 << CMD_CONTINUE));

    setup(TTA0, IN_OFS, OUT_OFS);
    bfm.put_bytes(TTA0 + DMEM + IN_OFS, frame[1], W * H);
    start(TTA0);
    wait_halt(TTA1);
    bfm.get_bytes(TTA1 + DMEM + OUT_OFS, res, W * H);
    check_frame(0, res);
    wait_halt(TTA0);
    bfm.get_bytes(TTA0 + DMEM + OUT_OFS, mid, W * H);

    // frame 1 blur on TTA1
    setup(TTA1, IN_OFS, OUT_OFS);
    bfm.put_bytes(TTA1 + DMEM + IN_OFS, mid, W * H);
    start(TTA1);
    wait_halt(TTA1);
    bfm.get_bytes(TTA1 + DMEM + OUT_OFS, res, W * H);
    check_frame(1, res);

    bfm.rd32(TTA0 + REG_CYCLE_CNT, d);
    $display("Sobel %0dx%0d on TTA0: %0d cycles", W, H, d);
    bfm.rd32(TTA1 + REG_CYCLE_CNT, d);
    $display("blur %0dx%0d on TTA1: %0d cycles", W, H, d);
    chk(bfm.nerr, 0, "AXI errors on mapped accesses");

    $display("events: both-running cycles %0d, halts %0d, breakpoints %0d, steps %0d, resets %0d, rho-VEX %0d, DECERR %0d, IDs %0d",
             n_both, n_halt, n_bp, n_step, n_reset, n_rvex, n_decerr, n_id);
    chk(32'(n_both > 0), 1, "both accelerators ran at the same time");
    chk(32'(n_halt), 4, "kernel completions");
    chk(32'(n_bp), 1, "breakpoint hit");
    chk(32'(n_step), 1, "single step");
    chk(32'(n_reset > 0), 1, "RESET command");
    chk(32'(n_rvex), 1, "rho-VEX window routed");
    chk(32'(n_decerr), 1, "DECERR on unmapped address");
    chk(32'(n_id), 2, "device IDs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
