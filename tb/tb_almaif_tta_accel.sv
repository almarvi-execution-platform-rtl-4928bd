// tb_almaif_tta_accel: end-to-end test of one AlmaIF TTA accelerator at its
// default sizes (64 KB IMEM, 32 KB DMEM, 2 KB PMEM, 4 KB scratchpad).
//
// Through the AXI slave only, as a host driver would, the test:
//  1. probes the capability registers (class, sizes, core count, debug);
//  2. loads the 3x3 box-blur kernel into IMEM, a random 16x8 image into
//     DMEM and the parameter block into PMEM;
//  3. sets a breakpoint inside the pixel loop, runs to it, checks PC and
//     status, reads two core registers through the debug read,
//     single-steps once, disables it and continues;
//  4. polls STATUS until the kernel halts, reads the output image back and
//     compares every interior pixel with the reference model;
//  5. checks the performance counters against each other and that the core
//     was stopped (en low) while it was in break.
`timescale 1ns / 1ps
module tb_almaif_tta_accel;
  import almaif_pkg::*;
  import tta_pkg::*;
  import tb_tta_asm_pkg::*;

  localparam logic [31:0] BASE = 32'h43C0_0000;
  localparam int OFS_W = 16;
  localparam logic [31:0] CTRL = BASE;
  localparam logic [31:0] IMEM = BASE + (32'(SEC_IMEM) << OFS_W);
  localparam logic [31:0] DMEM = BASE + (32'(SEC_DMEM) << OFS_W);
  localparam logic [31:0] PMEM = BASE + (32'(SEC_PMEM) << OFS_W);
  localparam int W = 16, H = 8;
  localparam int IN_OFS = 32'h100, OUT_OFS = 32'h400;

  logic clk = 0, rst_n = 0;
  axi_lite_req_t req;
  axi_lite_resp_t resp;
  logic running, halted;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  almaif_tta_accel dut (.clk, .rst_n, .s_axi_req(req), .s_axi_resp(resp), .running, .halted);
  tb_axi_master bfm (.clk, .req, .resp);

  initial begin
    repeat (2000000) @(posedge clk);
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

  TtaAsm a;
  byte unsigned img[], out[];
  logic [31:0] d, st, pc_bp, icnt, ccnt, bcnt;
  int polls, bp_at, run_cycles;
  always @(posedge clk) if (rst_n && running) run_cycles++;

  initial begin
    img = new[W * H];
    out = new[W * H];
    foreach (img[i]) img[i] = byte'($urandom);
    a = new();
    build_kernel(a, 1'b0);
    repeat (3) @(negedge clk);
    rst_n = 1;

    bfm.rd32(CTRL + REG_DEV_CLASS, d);  chk(d, DEV_CLASS_TTA, "device class");
    bfm.rd32(CTRL + REG_IMEM_SIZE, d);  chk(d, 65536, "IMEM size");
    bfm.rd32(CTRL + REG_DMEM_SIZE, d);  chk(d, 32768, "DMEM size");
    bfm.rd32(CTRL + REG_PMEM_SIZE, d);  chk(d, 2048, "PMEM size");
    bfm.rd32(CTRL + REG_CORE_COUNT, d); chk(d, 1, "core count");
    bfm.rd32(CTRL + REG_STATUS, d);     chk(d[ST_RESET], 1, "held in reset at power-up");

    bfm.load_program(IMEM, a.prog);
    // read back a few instruction halves
    for (int i = 0; i < 4; i++) begin
      bfm.rd32(IMEM + 32'(8 * i), d);     chk(d, a.prog[i][31:0], "IMEM low half");
      bfm.rd32(IMEM + 32'(8 * i + 4), d); chk(d, a.prog[i][63:32], "IMEM high half");
    end
    bfm.put_bytes(DMEM + IN_OFS, img, W * H);
    for (int i = 0; i < W * H; i += 4) bfm.wr32(DMEM + OUT_OFS + 32'(i), 0);
    bfm.wr32(PMEM + 0, W);
    bfm.wr32(PMEM + 4, H);
    bfm.wr32(PMEM + 8, CORE_DMEM + IN_OFS);
    bfm.wr32(PMEM + 12, CORE_DMEM + OUT_OFS);

    // breakpoint on the first instruction of the pixel loop body + 10
    bp_at = 60;
    bfm.wr32(CTRL + REG_START_ADDR, 0);
    bfm.wr32(CTRL + REG_BP_ADDR0, bp_at);
    bfm.wr32(CTRL + REG_BP_ENABLE, 1);
    bfm.wr32(CTRL + REG_CMD, 32'(1 << CMD_CONTINUE));
    do bfm.rd32(CTRL + REG_STATUS, st); while (!st[ST_BREAK]);
    chk(st[ST_BP_HIT], 1, "stopped by breakpoint");
    bfm.rd32(CTRL + REG_PC, pc_bp);     chk(pc_bp, bp_at, "PC at breakpoint");
    bfm.rd32(CTRL + REG_INSTR_CNT, icnt);
    // examine the stopped core: the kernel has loaded W and H into r1, r2
    bfm.wr32(CTRL + REG_DBG_SEL, 1);
    bfm.rd32(CTRL + REG_DBG_DATA, d);   chk(d, W, "debug read of r1 (W)");
    bfm.wr32(CTRL + REG_DBG_SEL, 14);
    bfm.rd32(CTRL + REG_DBG_DATA, d);   chk(d, H - 1, "debug read of r14 (H-1)");
    repeat (20) @(negedge clk);
    chk(running, 0, "core stays stopped in break");
    bfm.wr32(CTRL + REG_CMD, 32'(1 << CMD_STEP));
    bfm.rd32(CTRL + REG_INSTR_CNT, d);  chk(d, icnt + 1, "one instruction per STEP");
    bfm.rd32(CTRL + REG_PC, d);         chk(d, bp_at + 1, "PC after STEP");
    bfm.wr32(CTRL + REG_BP_ENABLE, 0);
    bfm.wr32(CTRL + REG_CMD, 32'(1 << CMD_CONTINUE));
    polls = 0;
    do begin bfm.rd32(CTRL + REG_STATUS, st); polls++; end while (!st[ST_HALTED] && polls < 100000);
    chk(st[ST_HALTED], 1, "kernel halted");
    chk(halted, 1, "halted output");

    bfm.get_bytes(DMEM + OUT_OFS, out, W * H);
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < W - 1; x++)
        chk(out[y * W + x], ref_blur(img, W, x, y), $sformatf("blur pixel (%0d,%0d)", x, y));
    chk(out[0], 0, "border pixel untouched");

    bfm.rd32(CTRL + REG_INSTR_CNT, icnt);
    bfm.rd32(CTRL + REG_CYCLE_CNT, ccnt);
    bfm.rd32(CTRL + REG_BREAK_CNT, bcnt);
    chk(ccnt, 32'(run_cycles), "cycle counter = cycles with the core enabled");
    // no stalls inside the core: one instruction per enabled cycle, except
    // the fetch bubble after reset
    chk(icnt, ccnt - 1, "one instruction per cycle");
    chk(bcnt, 3, "breaks: breakpoint, step, halt");
    chk(bfm.nerr, 0, "all AXI responses OKAY");
    $display("blur %0dx%0d: %0d instructions, %0d cycles, %0d per interior pixel", W, H, icnt, ccnt,
             ccnt / ((W - 2) * (H - 2)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
