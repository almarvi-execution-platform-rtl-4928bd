// almaif_ctrl: AlmaIF control interface (CTRL section) of one accelerator core.
//
// The host reads what kind of accelerator it talks to and what it has
// (identification and capability registers), watches the core (status,
// program counter, performance counters) and drives it (commands, start
// address, breakpoints). Register offsets and bits are listed in
// almaif_pkg. Commands written to REG_CMD:
//   RESET    hold the core in reset; it restarts from REG_START_ADDR
//   CONTINUE run (from reset or break)
//   BREAK    stop after the current cycle; the core is clock-enabled off,
//            which is also the low-power state of an idle accelerator
//   STEP     execute exactly one instruction, then break
// A running core also breaks when the instruction about to execute sits at
// an enabled breakpoint address (that instruction is not executed; the next
// CONTINUE or STEP executes it), and when it executes HALT (status HALTED).
// After power-on reset the core is held in reset.
//
// Host side: a simple request port (req, we, byte offset, byte enables,
// write data); read data is valid one cycle after req. Core side: core_rst_n
// (registered, so it can act as the core's asynchronous reset), en (global
// clock enable of the core, combinational from the registered state, the
// core's registered pc and the breakpoint registers), start_addr; from the
// core pc, ir_valid, retire, halt and the debug read (dbg_sel, dbg_data).
//
// Internal state: REG_DBG_SEL selects a core register (general register,
// return address or guard bits) and REG_DBG_DATA reads it, for examining a
// stopped core.
//
// The register groups and the commands (reset, start, stop, start address,
// breakpoints, single step, performance counters, sizes and core count in
// the capability registers) follow AlmaIF. Offsets, bit positions, the
// counter set (cycles run, instructions retired, breaks) and the breakpoint
// count are this design's own.
module almaif_ctrl
  import almaif_pkg::*;
#(
  parameter int unsigned PC_W       = 13,
  parameter int unsigned NUM_BP     = 2,
  parameter logic [31:0] DEV_CLASS  = DEV_CLASS_TTA,
  parameter logic [31:0] DEVICE_ID  = 32'h0000_0001,
  parameter int unsigned CORE_COUNT = 1,
  parameter int unsigned IMEM_BYTES = 65536,
  parameter int unsigned DMEM_BYTES = 32768,
  parameter int unsigned PMEM_BYTES = 2048
) (
  input  logic               clk,
  input  logic               rst_n,
  // host side
  input  logic               req,
  input  logic               we,
  input  logic [CTRL_AW-1:0] addr,
  input  logic [3:0]         be,
  input  logic [31:0]        wdata,
  output logic [31:0]        rdata,
  // core side
  output logic               core_rst_n,
  output logic               en,
  output logic [PC_W-1:0]    start_addr,
  input  logic [PC_W-1:0]    pc,
  input  logic               ir_valid,
  input  logic               retire,
  input  logic               halt,
  output logic [5:0]         dbg_sel,   // which core state DBG_DATA shows
  input  logic [31:0]        dbg_data,
  // summary status
  output logic               running,   // the core is enabled this cycle
  output logic               halted
);

  typedef enum logic [1:0] {
    C_RESET = 2'd0,
    C_RUN   = 2'd1,
    C_BREAK = 2'd2,
    C_STEP  = 2'd3
  } cstate_e;

  cstate_e                    state;
  logic                       bp_hit_flag, skip_bp;
  logic [NUM_BP-1:0]          bp_en;
  logic [NUM_BP-1:0][PC_W-1:0] bp_addr;
  logic [31:0]                cycle_cnt, instr_cnt, break_cnt;
  logic                       bp_match;
  logic                       wr_cmd;
  logic [3:0]                 cmd;

  // Breakpoint: only in RUN, only on a valid instruction, not on the first
  // instruction after a CONTINUE (so a resumed core can leave the address).
  always_comb begin
    bp_match = 1'b0;
    for (int i = 0; i < NUM_BP; i++) begin
      if (bp_en[i] && bp_addr[i] == pc) bp_match = 1'b1;
    end
    bp_match = bp_match && ir_valid && !skip_bp && state == C_RUN;
    en = ((state == C_RUN && !bp_match) || state == C_STEP) && core_rst_n;
  end

  assign running = en;

  assign wr_cmd = req && we && addr == REG_CMD && be[0];
  assign cmd    = wr_cmd ? wdata[3:0] : 4'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_RESET;
      core_rst_n  <= 1'b0;
      halted      <= 1'b0;
      bp_hit_flag <= 1'b0;
      skip_bp     <= 1'b0;
      cycle_cnt   <= '0;
      instr_cnt   <= '0;
      break_cnt   <= '0;
    end else begin
      core_rst_n <= (state != C_RESET);
      if (en) cycle_cnt <= cycle_cnt + 1;
      if (retire) instr_cnt <= instr_cnt + 1;
      if (retire) skip_bp <= 1'b0;
      unique case (state)
        C_RUN: begin
          if (halt) begin
            state     <= C_BREAK;
            halted    <= 1'b1;
            break_cnt <= break_cnt + 1;
          end else if (bp_match || cmd[CMD_BREAK]) begin
            state       <= C_BREAK;
            bp_hit_flag <= bp_match;
            break_cnt   <= break_cnt + 1;
          end
        end
        C_STEP: begin
          if (retire) begin
            state     <= C_BREAK;
            halted    <= halt;
            break_cnt <= break_cnt + 1;
          end
        end
        C_BREAK, C_RESET: begin
          if (cmd[CMD_CONTINUE]) begin
            state       <= C_RUN;
            skip_bp     <= 1'b1;
            halted      <= 1'b0;
            bp_hit_flag <= 1'b0;
          end else if (cmd[CMD_STEP]) begin
            state       <= C_STEP;
            halted      <= 1'b0;
            bp_hit_flag <= 1'b0;
          end
        end
        default: state <= C_RESET;
      endcase
      // RESET overrides everything else written in the same command.
      if (cmd[CMD_RESET]) begin
        state       <= C_RESET;
        core_rst_n  <= 1'b0;
        halted      <= 1'b0;
        bp_hit_flag <= 1'b0;
        skip_bp     <= 1'b0;
        cycle_cnt   <= '0;
        instr_cnt   <= '0;
        break_cnt   <= '0;
      end
    end
  end

  // Writable settings.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_addr <= '0;
      dbg_sel    <= '0;
      bp_en      <= '0;
      bp_addr    <= '0;
    end else if (req && we) begin
      if (addr == REG_START_ADDR) start_addr <= wdata[PC_W-1:0];
      if (addr == REG_BP_ENABLE)  bp_en      <= wdata[NUM_BP-1:0];
      if (addr == REG_DBG_SEL)    dbg_sel    <= wdata[5:0];
      for (int i = 0; i < NUM_BP; i++) begin
        if (addr == REG_BP_ADDR0 + CTRL_AW'(4 * i)) bp_addr[i] <= wdata[PC_W-1:0];
      end
    end
  end

  // Read mux, registered (one-cycle latency like the memories).
  logic [31:0] rd;
  always_comb begin
    rd = '0;
    unique case (addr)
      REG_DEV_CLASS:  rd = DEV_CLASS;
      REG_DEVICE_ID:  rd = DEVICE_ID;
      REG_VERSION:    rd = ALMAIF_VERSION;
      REG_CORE_COUNT: rd = CORE_COUNT;
      REG_IMEM_SIZE:  rd = IMEM_BYTES;
      REG_DMEM_SIZE:  rd = DMEM_BYTES;
      REG_PMEM_SIZE:  rd = PMEM_BYTES;
      REG_DEBUG_FEAT: rd = {20'd0, 4'(NUM_BP), 6'd0, 1'b1, 1'b1};
      REG_STATUS:     rd = {27'd0, bp_hit_flag, halted, state == C_RESET,
                            state == C_BREAK, state == C_RUN || state == C_STEP};
      REG_PC:         rd = 32'(pc);
      REG_CYCLE_CNT:  rd = cycle_cnt;
      REG_INSTR_CNT:  rd = instr_cnt;
      REG_BREAK_CNT:  rd = break_cnt;
      REG_DBG_DATA:   rd = dbg_data;
      REG_DBG_SEL:    rd = 32'(dbg_sel);
      REG_START_ADDR: rd = 32'(start_addr);
      REG_BP_ENABLE:  rd = 32'(bp_en);
      default: begin
        for (int i = 0; i < NUM_BP; i++) begin
          if (addr == REG_BP_ADDR0 + CTRL_AW'(4 * i)) rd = 32'(bp_addr[i]);
        end
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   rdata <= '0;
    else if (req) rdata <= rd;
  end

endmodule
