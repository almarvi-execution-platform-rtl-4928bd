// tb_almaif_cmdqueue: the parameter memory used as a command queue for a
// kernel that stays resident on the accelerator.
//
// One AlmaIF TTA accelerator at its default sizes runs the resident kernel
// of build_server (tb_tta_asm_pkg). It is started once and never halts. The
// host drives it only through the AXI slave:
//  1. loads the kernel, starts the core and checks it keeps running while
//     the command word in PMEM is empty;
//  2. for each of three jobs (blur, Sobel, blur; different sizes and
//     buffers) writes the image into DMEM, the parameter block into PMEM
//     and then the command word; polls until the kernel clears it and
//     checks the kernel's job count;
//  3. while job 2 runs, reads the result of job 1 back from DMEM: host and
//     core use the shared memories at the same time;
//  4. checks every interior pixel of each job against the reference model,
//     and that the core never halted or reset between jobs.
// Follows the document: "The parameter memory is intended to be used as a
// command queue for the kernel running on the accelerator." The command
// word layout and the job kinds are this bench's own.
`timescale 1ns / 1ps
module tb_almaif_cmdqueue;
  import almaif_pkg::*;
  import tta_pkg::*;
  import tb_tta_asm_pkg::*;

  localparam logic [31:0] BASE = 32'h43C0_0000;
  localparam int OFS_W = 16;
  localparam logic [31:0] CTRL = BASE;
  localparam logic [31:0] IMEM = BASE + (32'(SEC_IMEM) << OFS_W);
  localparam logic [31:0] DMEM = BASE + (32'(SEC_DMEM) << OFS_W);
  localparam logic [31:0] PMEM = BASE + (32'(SEC_PMEM) << OFS_W);
  localparam int NJOB = 3;

  logic clk = 0, rst_n = 0;
  axi_lite_req_t req;
  axi_lite_resp_t resp;
  logic running, halted;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  almaif_tta_accel dut (.clk, .rst_n, .s_axi_req(req), .s_axi_resp(resp), .running, .halted);
  tb_axi_master bfm (.clk, .req, .resp);

  initial begin
    repeat (3000000) @(posedge clk);
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

  // job table: kind (1 blur, 2 sobel), size, DMEM offsets
  int kind[NJOB] = '{1, 2, 1};
  int jw[NJOB] = '{16, 20, 12};
  int jh[NJOB] = '{8, 10, 12};
  int in_ofs[NJOB] = '{32'h100, 32'h800, 32'h1000};
  int out_ofs[NJOB] = '{32'h400, 32'hC00, 32'h1400};

  TtaAsm a;
  byte unsigned img[NJOB][], out[];
  logic [31:0] d, st;
  int polls, stopped_cycles, job_cycles[NJOB];
  logic [31:0] c0;
  always @(posedge clk) if (rst_n && !running) stopped_cycles++;

  task automatic submit(int j);
    img[j] = new[jw[j] * jh[j]];
    foreach (img[j][i]) img[j][i] = byte'($urandom);
    bfm.put_bytes(DMEM + in_ofs[j], img[j], jw[j] * jh[j]);
    for (int i = 0; i < jw[j] * jh[j]; i += 4) bfm.wr32(DMEM + out_ofs[j] + 32'(i), 0);
    bfm.wr32(PMEM + 0, jw[j]);
    bfm.wr32(PMEM + 4, jh[j]);
    bfm.wr32(PMEM + 8, CORE_DMEM + in_ofs[j]);
    bfm.wr32(PMEM + 12, CORE_DMEM + out_ofs[j]);
    bfm.rd32(CTRL + REG_CYCLE_CNT, c0);
    bfm.wr32(PMEM + 16, kind[j]);
  endtask

  task automatic wait_done(int j);
    polls = 0;
    do begin bfm.rd32(PMEM + 16, d); polls++; end while (d != 0 && polls < 200000);
    chk(d, 0, $sformatf("job %0d: command word cleared", j));
    bfm.rd32(CTRL + REG_CYCLE_CNT, d);
    job_cycles[j] = int'(d - c0);
    bfm.rd32(PMEM + 20, d);
    chk(d, j + 1, $sformatf("job %0d: job count", j));
  endtask

  task automatic check_out(int j);
    out = new[jw[j] * jh[j]];
    bfm.get_bytes(DMEM + out_ofs[j], out, jw[j] * jh[j]);
    for (int y = 1; y < jh[j] - 1; y++)
      for (int x = 1; x < jw[j] - 1; x++)
        chk(out[y * jw[j] + x],
            kind[j] == 1 ? ref_blur(img[j], jw[j], x, y) : ref_sobel(img[j], jw[j], x, y),
            $sformatf("job %0d pixel (%0d,%0d)", j, x, y));
    chk(out[0], 0, $sformatf("job %0d border untouched", j));
  endtask

  initial begin
    a = new();
    build_server(a);
    repeat (3) @(negedge clk);
    rst_n = 1;

    bfm.load_program(IMEM, a.prog);
    bfm.wr32(PMEM + 16, 0);
    bfm.wr32(PMEM + 20, 0);
    bfm.wr32(CTRL + REG_START_ADDR, 0);
    bfm.wr32(CTRL + REG_CMD, 32'(1 << CMD_CONTINUE));
    stopped_cycles = 0;
    repeat (500) @(negedge clk);
    chk(running, 1, "idle kernel keeps running");
    bfm.rd32(PMEM + 20, d);         chk(d, 0, "no job counted while the queue is empty");

    submit(0);
    wait_done(0);
    submit(1);
    // read job 0 back while job 1 is running
    chk(running, 1, "core running during read-back");
    check_out(0);
    bfm.rd32(PMEM + 16, d);         chk(d, 2, "job 1 still in progress after read-back");
    wait_done(1);
    check_out(1);
    submit(2);
    wait_done(2);
    check_out(2);

    bfm.rd32(CTRL + REG_STATUS, st);
    chk(st[ST_RUNNING], 1, "still running after the last job");
    chk(st[ST_HALTED] | st[ST_RESET] | st[ST_BREAK], 0, "never halted, reset or broke");
    chk(halted, 0, "halted output low");
    chk(stopped_cycles, 0, "core enabled on every cycle since start");
    chk(bfm.nerr, 0, "all AXI responses OKAY");
    for (int j = 0; j < NJOB; j++)
      $display("job %0d (%s %0dx%0d): %0d cycles from command to done", j,
               kind[j] == 1 ? "blur" : "sobel", jw[j], jh[j], job_cycles[j]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
