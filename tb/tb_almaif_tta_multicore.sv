// tb_almaif_tta_multicore: test of a two-core AlmaIF TTA accelerator
// (almaif_tta_accel with N_CORES = 2, memories at their default sizes).
//
// Through the AXI slave only, the test:
//  1. reads the core count and device class from both CTRL windows
//     (core i at CTRL offset i * 0x100);
//  2. loads one 3x3 box-blur program per core into the shared IMEM (core 0
//     at instruction 0, core 1 at instruction 512), one parameter block per
//     core into the shared PMEM and a random 16x12 image into the shared
//     DMEM; core 0 blurs the upper half of the rows, core 1 the lower half;
//  3. starts core 0, checks that core 1 stays in reset, then starts core 1
//     from its own START_ADDR;
//  4. waits for both to halt, checks that the summary output halted rises
//     only when both have, and compares the whole output image with the
//     reference model;
//  5. resets core 1 through its window and checks that core 0 keeps its
//     state, and that each window reports its own counters.
// Counted mechanisms (a failure if never seen): both cores executing in
// the same cycle, one core halted while the other still runs.
`timescale 1ns / 1ps
module tb_almaif_tta_multicore;
  import almaif_pkg::*;
  import tta_pkg::*;
  import tb_tta_asm_pkg::*;

  localparam logic [31:0] BASE = 32'h43C0_0000;
  localparam int OFS_W = 16;
  localparam logic [31:0] CTRL0 = BASE;
  localparam logic [31:0] CTRL1 = BASE + 32'h100;
  localparam logic [31:0] IMEM = BASE + (32'(SEC_IMEM) << OFS_W);
  localparam logic [31:0] DMEM = BASE + (32'(SEC_DMEM) << OFS_W);
  localparam logic [31:0] PMEM = BASE + (32'(SEC_PMEM) << OFS_W);
  localparam int W = 16, H = 12, HH = H / 2;
  localparam int IN_OFS = 32'h100, OUT_OFS = 32'h400;
  localparam int ORG1 = 512;

  logic clk = 0, rst_n = 0;
  axi_lite_req_t req;
  axi_lite_resp_t resp;
  logic running, halted;
  int checks = 0, failures = 0;
  int both_run = 0, one_halted = 0;

  always #5 clk = ~clk;

  almaif_tta_accel #(.N_CORES(2)) dut (.clk, .rst_n, .s_axi_req(req), .s_axi_resp(resp),
                                       .running, .halted);
  tb_axi_master bfm (.clk, .req, .resp);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // both cores executing in the same cycle
  always @(posedge clk) if (rst_n && dut.en == 2'b11) both_run++;

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  TtaAsm k0, k1;
  byte unsigned img[], out[];
  logic [31:0] d, s0, s1, ic0, ic1, cc0;
  int polls;
  logic h;

  initial begin
    img = new[W * H];
    out = new[W * H];
    foreach (img[i]) img[i] = byte'($urandom);
    k0 = new(0);    build_kernel(k0, 1'b0, CORE_PMEM);
    k1 = new(ORG1); build_kernel(k1, 1'b0, CORE_PMEM + 16);
    repeat (3) @(negedge clk);
    rst_n = 1;

    bfm.rd32(CTRL0 + 32'(REG_CORE_COUNT), d); chk(d, 2, "core count, window 0");
    bfm.rd32(CTRL1 + 32'(REG_CORE_COUNT), d); chk(d, 2, "core count, window 1");
    bfm.rd32(CTRL1 + 32'(REG_DEV_CLASS), d);  chk(d, DEV_CLASS_TTA, "device class, window 1");
    bfm.rd32(CTRL1 + 32'(REG_DMEM_SIZE), d);  chk(d, 32768, "DMEM size, window 1");

    bfm.load_program(IMEM, k0.prog);
    bfm.load_program(IMEM + 32'(8 * ORG1), k1.prog);
    bfm.put_bytes(DMEM + IN_OFS, img, W * H);
    for (int i = 0; i < W * H; i += 4) bfm.wr32(DMEM + OUT_OFS + 32'(i), 0);
    // core 0: rows 0..HH of the image, i.e. output rows 1..HH-1
    bfm.wr32(PMEM + 0, W);
    bfm.wr32(PMEM + 4, HH + 1);
    bfm.wr32(PMEM + 8, CORE_DMEM + IN_OFS);
    bfm.wr32(PMEM + 12, CORE_DMEM + OUT_OFS);
    // core 1: rows HH-1..H-1, i.e. output rows HH..H-2
    bfm.wr32(PMEM + 16, W);
    bfm.wr32(PMEM + 20, H - HH + 1);
    bfm.wr32(PMEM + 24, CORE_DMEM + IN_OFS + (HH - 1) * W);
    bfm.wr32(PMEM + 28, CORE_DMEM + OUT_OFS + (HH - 1) * W);

    bfm.wr32(CTRL0 + 32'(REG_START_ADDR), 0);
    bfm.wr32(CTRL1 + 32'(REG_START_ADDR), ORG1);
    bfm.wr32(CTRL0 + 32'(REG_CMD), 32'(1 << CMD_CONTINUE));
    repeat (50) @(negedge clk);
    bfm.rd32(CTRL1 + 32'(REG_STATUS), s1);
    chk(s1[ST_RESET], 1, "core 1 still in reset while core 0 runs");
    bfm.rd32(CTRL0 + 32'(REG_STATUS), s0);
    chk(s0[ST_RUNNING], 1, "core 0 running");
    bfm.wr32(CTRL1 + 32'(REG_CMD), 32'(1 << CMD_CONTINUE));

    polls = 0;
    do begin
      bfm.rd32(CTRL0 + 32'(REG_STATUS), s0);
      h = halted;  // sampled before core 1's status is read: halting is final
      bfm.rd32(CTRL1 + 32'(REG_STATUS), s1);
      if (s0[ST_HALTED] && !s1[ST_HALTED]) begin
        one_halted++;
        checks++;
        if (h) begin failures++; $display("FAIL halted high with one core still running"); end
      end
      polls++;
    end while (!(s0[ST_HALTED] && s1[ST_HALTED]) && polls < 100000);
    chk(s0[ST_HALTED], 1, "core 0 halted");
    chk(s1[ST_HALTED], 1, "core 1 halted");
    chk(halted, 1, "halted output with both cores done");

    bfm.get_bytes(DMEM + OUT_OFS, out, W * H);
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++)
        chk(out[y * W + x], ref_blur(img, W, x, y), $sformatf("blur pixel (%0d,%0d)", x, y));

    // each window has its own counters and program counter
    bfm.rd32(CTRL0 + 32'(REG_INSTR_CNT), ic0);
    bfm.rd32(CTRL1 + 32'(REG_INSTR_CNT), ic1);
    bfm.rd32(CTRL0 + 32'(REG_CYCLE_CNT), cc0);
    chk(ic0, cc0 - 1, "core 0: one instruction per enabled cycle");
    checks++;
    if (ic0 == 0 || ic1 == 0) begin failures++; $display("FAIL instruction counters %0d %0d", ic0, ic1); end
    bfm.rd32(CTRL1 + 32'(REG_PC), d);
    checks++;
    if (d < ORG1) begin failures++; $display("FAIL core 1 PC %0d outside its program", d); end

    // reset core 1 only
    bfm.wr32(CTRL1 + 32'(REG_CMD), 32'(1 << CMD_RESET));
    bfm.rd32(CTRL1 + 32'(REG_STATUS), s1); chk(s1[ST_RESET], 1, "core 1 reset");
    bfm.rd32(CTRL0 + 32'(REG_STATUS), s0); chk(s0[ST_HALTED], 1, "core 0 unaffected");
    bfm.rd32(CTRL0 + 32'(REG_INSTR_CNT), d); chk(d, ic0, "core 0 counter unaffected");
    chk(bfm.nerr, 0, "all AXI responses OKAY");

    checks++;
    if (both_run == 0) begin failures++; $display("FAIL both cores never ran together"); end
    checks++;
    if (one_halted == 0) begin failures++; $display("FAIL never saw one core halted alone"); end
    $display("instructions: core 0 %0d, core 1 %0d; cycles with both running %0d", ic0, ic1, both_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
