// tb_almaif_ctrl: self-checking test of the AlmaIF control interface.
//
// A small core model (pc advances by one per enabled cycle after a fetch
// bubble) stands in for the processor. The test reads the identification
// and capability registers, then drives the commands: reset hold, start
// address, CONTINUE, BREAK, STEP (exactly one instruction), a breakpoint
// (stops before the instruction, CONTINUE moves past it), HALT from the
// core, and RESET clearing the counters. The cycle counter is compared with
// the number of enabled cycles counted here.
`timescale 1ns / 1ps
module tb_almaif_ctrl;
  import almaif_pkg::*;
  localparam int PC_W = 13;

  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0;
  logic [7:0] addr = 0;
  logic [3:0] be = 4'hF;
  logic [31:0] wdata = 0, rdata;
  logic core_rst_n, en, running, halted;
  logic [PC_W-1:0] start_addr, pc;
  logic ir_valid, retire, halt = 0;
  logic [5:0] dbg_sel;
  logic [31:0] dbg_data;
  // core state seen through the debug read: a value derived from the selector
  assign dbg_data = 32'hDB00_0000 | (32'(dbg_sel) * 3);
  int checks = 0, failures = 0;
  int en_cycles = 0, retires = 0;

  always #5 clk = ~clk;

  almaif_ctrl #(.PC_W(PC_W), .NUM_BP(2), .DEVICE_ID(32'h42), .CORE_COUNT(1),
                .IMEM_BYTES(65536), .DMEM_BYTES(32768), .PMEM_BYTES(2048)) dut (.*);

  // core model
  always_ff @(posedge clk or negedge core_rst_n) begin
    if (!core_rst_n) begin
      pc <= start_addr;
      ir_valid <= 1'b0;
    end else if (en) begin
      ir_valid <= 1'b1;
      if (ir_valid) pc <= pc + 1'b1;
    end
  end
  assign retire = en && ir_valid;
  always_ff @(posedge clk) begin
    if (en) en_cycles <= en_cycles + 1;
    if (retire) retires <= retires + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    req = 1; we = 1; addr = a; wdata = d;
    @(negedge clk);
    req = 0; we = 0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    req = 1; we = 0; addr = a;
    @(negedge clk);
    req = 0;
    d = rdata;
  endtask

  logic [31:0] d;
  int e0, r0;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    rd(REG_DEV_CLASS, d);  chk(d, DEV_CLASS_TTA, "device class");
    rd(REG_DEVICE_ID, d);  chk(d, 32'h42, "device id");
    rd(REG_VERSION, d);    chk(d, ALMAIF_VERSION, "version");
    rd(REG_CORE_COUNT, d); chk(d, 1, "core count");
    rd(REG_IMEM_SIZE, d);  chk(d, 65536, "imem size");
    rd(REG_DMEM_SIZE, d);  chk(d, 32768, "dmem size");
    rd(REG_PMEM_SIZE, d);  chk(d, 2048, "pmem size");
    rd(REG_DEBUG_FEAT, d); chk(d, 32'h0000_0203, "debug features");
    rd(REG_STATUS, d);     chk(d, 32'h4, "status after reset");
    chk(core_rst_n, 0, "core held in reset");
    chk(en, 0, "core disabled in reset");

    wr(REG_START_ADDR, 32'h10);
    rd(REG_START_ADDR, d); chk(d, 32'h10, "start address");
    rd(REG_PC, d);         chk(d, 32'h10, "pc = start address");

    // run
    wr(REG_CMD, 32'(1 << CMD_CONTINUE));
    @(negedge clk);
    chk(en, 1, "running after CONTINUE");
    rd(REG_STATUS, d);     chk(d, 32'h1, "status running");
    repeat (20) @(negedge clk);
    wr(REG_CMD, 32'(1 << CMD_BREAK));
    chk(en, 0, "stopped after BREAK");
    e0 = en_cycles;
    rd(REG_CYCLE_CNT, d);  chk(d, 32'(e0), "cycle counter");
    rd(REG_INSTR_CNT, d);  chk(d, 32'(retires), "instruction counter");
    rd(REG_STATUS, d);     chk(d, 32'h2, "status break");
    rd(REG_PC, d);         chk(d, 32'(pc), "pc readback");
    chk(32'(pc), 32'h10 + 32'(e0) - 1, "pc advanced by enabled cycles");

    // single step
    r0 = retires;
    wr(REG_CMD, 32'(1 << CMD_STEP));
    repeat (3) @(negedge clk);
    chk(32'(retires - r0), 1, "STEP executes one instruction");
    rd(REG_STATUS, d);     chk(d, 32'h2, "break after step");

    // breakpoint 5 instructions ahead on BP1
    wr(REG_BP_ADDR0 + 8'd4, 32'(pc) + 5);
    wr(REG_BP_ENABLE, 32'b10);
    rd(REG_BP_ADDR0 + 8'd4, d); chk(d, 32'(pc) + 5, "bp address readback");
    d = 32'(pc) + 5;
    wr(REG_CMD, 32'(1 << CMD_CONTINUE));
    repeat (10) @(negedge clk);
    chk(32'(pc), d, "stopped at breakpoint");
    rd(REG_STATUS, d);     chk(d, 32'h12, "status break + breakpoint");
    r0 = retires;
    wr(REG_CMD, 32'(1 << CMD_CONTINUE));
    repeat (4) @(negedge clk);
    chk(en, 1, "continue leaves the breakpoint");
    chk(32'(retires > r0), 1, "instructions after breakpoint");

    // halt from the core
    @(negedge clk);
    halt = 1;
    @(negedge clk);
    halt = 0;
    chk(en, 0, "HALT stops the core");
    chk(halted, 1, "halted output");
    rd(REG_STATUS, d);     chk(d, 32'hA, "status break + halted");
    rd(REG_BREAK_CNT, d);  chk(d, 4, "break counter");

    // reset command
    wr(REG_CMD, 32'(1 << CMD_RESET));
    @(negedge clk);
    chk(core_rst_n, 0, "RESET holds core");
    rd(REG_CYCLE_CNT, d);  chk(d, 0, "counters cleared");
    rd(REG_STATUS, d);     chk(d, 32'h4, "status reset");
    rd(REG_PC, d);         chk(d, 32'h10, "pc back at start address");

    // debug read of core state
    wr(REG_DBG_SEL, 17);
    chk(32'(dbg_sel), 17, "debug selector to the core");
    rd(REG_DBG_SEL, d);    chk(d, 17, "debug selector read back");
    rd(REG_DBG_DATA, d);   chk(d, 32'hDB00_0000 | 51, "debug data");
    wr(REG_DBG_SEL, 33);
    rd(REG_DBG_DATA, d);   chk(d, 32'hDB00_0000 | 99, "debug data, guard selector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
