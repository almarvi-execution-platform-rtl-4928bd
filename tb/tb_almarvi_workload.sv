// tb_almarvi_workload: the platform's two-filter application at the full
// frame width of 1280 pixels, on the top at its default parameters.
//
// A 1280x1024 frame does not fit one accelerator's 32 KB data memory, so
// the host works in horizontal strips. This test runs the largest strip
// the default memories hold: 13 input rows of 1280 pixels (16,640 bytes)
// at DMEM offset 0, and the 11 output rows written from row 13 on, so the
// strip uses bytes 0 .. 30,719 of the 32,768-byte DMEM. Output row y of
// the kernel lands at output base + y*1280, hence the output base is
// 12*1280 and rows 1..11 occupy rows 13..23.
//
//  1. TTA0 runs the Sobel kernel on the strip (rows 1..11 computed);
//  2. the host copies Sobel rows 1..11 into TTA1's DMEM as an 11-row strip;
//  3. TTA1 runs the 3x3 box blur on it (rows 2..10 of the original strip).
// Both results are compared pixel by pixel with the reference models. The
// cycle counters are read to give cycles per pixel and a full-frame time,
// and must show one instruction per enabled cycle (no stalls).
`timescale 1ns / 1ps
module tb_almarvi_workload;
  import almaif_pkg::*;
  import tta_pkg::*;
  import tb_tta_asm_pkg::*;

  localparam logic [31:0] TTA0 = 32'h43C0_0000;
  localparam logic [31:0] TTA1 = 32'h43C4_0000;
  localparam logic [31:0] DMEM = 32'(SEC_DMEM) << 16;
  localparam logic [31:0] PMEM = 32'(SEC_PMEM) << 16;
  localparam logic [31:0] IMEM = 32'(SEC_IMEM) << 16;
  localparam int W = 1280, H = 13, HB = H - 2;
  localparam int IN_OFS = 0, OUT_OFS = 12 * W;
  localparam int DMEM_BYTES = 32768;

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
    repeat (20000000) @(posedge clk);
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

  task automatic run(logic [31:0] base, int idx, int h, output logic [31:0] cyc,
                     output logic [31:0] ins);
    logic [31:0] st;
    bfm.wr32(base + PMEM + 0, W);
    bfm.wr32(base + PMEM + 4, h);
    bfm.wr32(base + PMEM + 8, CORE_DMEM + IN_OFS);
    bfm.wr32(base + PMEM + 12, CORE_DMEM + OUT_OFS);
    bfm.wr32(base + 32'(REG_START_ADDR), 0);
    bfm.wr32(base + 32'(REG_CMD), 32'(1 << CMD_CONTINUE));
    wait (tta_halted[idx]);
    bfm.rd32(base + 32'(REG_STATUS), st);
    chk(32'(st[ST_HALTED]), 1, "kernel halted");
    bfm.rd32(base + 32'(REG_CYCLE_CNT), cyc);
    bfm.rd32(base + 32'(REG_INSTR_CNT), ins);
    chk(ins, cyc - 1, "one instruction per enabled cycle");
  endtask

  TtaAsm sobel_k, blur_k;
  byte unsigned img[], sob[], mid[], res[], zero[];
  logic [31:0] c0, i0, c1, i1;
  int errs, px0, px1;

  initial begin
    img = new[W * H];
    sob = new[W * H];
    mid = new[W * HB];
    res = new[W * HB];
    zero = new[W * H];
    foreach (zero[i]) zero[i] = 0;
    // synthetic picture: gradient, vertical bars and noise
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y * W + x] = byte'((x / 2 + 9 * y) ^ (((x / 40) % 2) * 8'hA0)) + byte'($urandom_range(0, 15));
    sobel_k = new(); build_kernel(sobel_k, 1'b1);
    blur_k  = new(); build_kernel(blur_k, 1'b0);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // the strip fits the data memory
    checks++;
    if (OUT_OFS + (HB + 1) * W > DMEM_BYTES) begin failures++; $display("FAIL strip does not fit"); end

    // Sobel on TTA0
    bfm.load_program(TTA0 + IMEM, sobel_k.prog);
    bfm.put_bytes(TTA0 + DMEM + IN_OFS, img, W * H);
    bfm.put_bytes(TTA0 + DMEM + OUT_OFS + W, zero, W * (H - 2));  // output rows 1..11 only: row 0 is input row 12
    run(TTA0, 0, H, c0, i0);
    bfm.get_bytes(TTA0 + DMEM + OUT_OFS, sob, W * H - W);
    errs = 0;
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++) begin
        checks++;
        if (sob[y * W + x] != ref_sobel(img, W, x, y)) begin
          failures++;
          if (errs++ < 5) $display("FAIL sobel (%0d,%0d): got %0d expected %0d", x, y,
                                   sob[y * W + x], ref_sobel(img, W, x, y));
        end
      end

    // blur of Sobel rows 1..11 on TTA1
    for (int i = 0; i < W * HB; i++) mid[i] = sob[W + i];
    bfm.load_program(TTA1 + IMEM, blur_k.prog);
    bfm.put_bytes(TTA1 + DMEM + IN_OFS, mid, W * HB);
    bfm.put_bytes(TTA1 + DMEM + OUT_OFS + W, zero, W * (HB - 2));
    run(TTA1, 1, HB, c1, i1);
    bfm.get_bytes(TTA1 + DMEM + OUT_OFS, res, W * HB);
    errs = 0;
    for (int y = 1; y < HB - 1; y++)
      for (int x = 1; x < W - 1; x++) begin
        checks++;
        if (res[y * W + x] != ref_blur(mid, W, x, y)) begin
          failures++;
          if (errs++ < 5) $display("FAIL blur (%0d,%0d): got %0d expected %0d", x, y,
                                   res[y * W + x], ref_blur(mid, W, x, y));
        end
      end
    chk(bfm.nerr, 0, "all AXI responses OKAY");

    px0 = (W - 2) * (H - 2);
    px1 = (W - 2) * (HB - 2);
    $display("sobel strip %0dx%0d: %0d cycles, %0d.%02d cycles/pixel, full frame %0d ms at 200 MHz",
             W, H, c0, c0 / px0, (c0 % px0) * 100 / px0, 64'(c0) * 1024 / (H - 2) * 1000 / 200_000_000);
    $display("blur strip %0dx%0d:  %0d cycles, %0d.%02d cycles/pixel, full frame %0d ms at 200 MHz",
             W, HB, c1, c1 / px1, (c1 % px1) * 100 / px1, 64'(c1) * 1024 / (HB - 2) * 1000 / 200_000_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
