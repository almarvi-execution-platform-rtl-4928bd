// tta_core: transport-triggered (TTA) processor core of the AlmaIF accelerator.
//
// The core is programmed with data transports rather than operations. Each
// 64-bit instruction holds one move per transport bus (three buses), or one
// move plus a 32-bit long immediate (see tta_pkg for the encoding). In one
// cycle every active move reads its source, then all moves write their
// destination together: a register, a boolean guard register, or a port of
// a function unit. Writing a unit's trigger port starts its operation.
// Units: two ALUs (latency 2), one 32x32 multiplier (latency 3), one
// load/store unit (latency 3), a 32x32 register file, a 2x1 boolean
// register file, an immediate unit (IMM.R) and the control unit (GCU).
// Every move can be guarded by B0, !B0 or B1, which is how branches are made
// conditional. Results stay on a unit's R port until overwritten, and the
// program itself must wait the unit's latency before reading R: the core
// has no interlocks, as in any TTA.
//
// Control unit: the core fetches from a synchronous instruction memory, so
// a jump, call or halt executed in cycle t lets the next instruction (the
// delay slot) execute as well. CALL saves the address after the delay slot
// in RA; "RA -> GCU.T.JUMP" returns. HALT stops the core through the
// control interface (halt pulse) and is how a kernel reports completion.
//
// The whole core advances only while en is high (the global lock of the
// control interface, used for run/break/step). core_rst_n resets it; after
// reset the first fetch is from start_addr. pc is the instruction address
// that executes on the next enabled cycle, ir_valid says whether an
// instruction is waiting there (it is low after reset until the first fetch
// returns), retire pulses for every executed instruction.
//
// Debug: dbg_sel picks a general register (0..31), RA (32) or the guard
// bits {B1, B0} (33); dbg_data shows it combinationally. The control
// interface reads it while the core is stopped, for examining the
// processor's state. The register file has a fourth read port for this.
//
// The unit mix, the latencies and the register file sizes follow the
// prototype TTA; the bus count, the full bus connectivity and the encoding
// are this design's own.
module tta_core
  import tta_pkg::*;
#(
  parameter int unsigned PC_W  = 13,  // 8192 instructions = 64 KB of IMEM
  parameter int unsigned OFS_W = 15   // data address offset (32 KB DMEM)
) (
  input  logic                 clk,
  input  logic                 core_rst_n,
  input  logic                 en,
  input  logic [PC_W-1:0]      start_addr,
  // instruction memory (synchronous read)
  output logic                 imem_en,    // = en: a fetch whenever the core advances
  output logic [PC_W-1:0]      imem_addr,
  input  logic [INSTR_W-1:0]   imem_rdata,
  // data memories: 0 = scratchpad, 1 = DMEM, 2 = PMEM
  output logic [2:0]           mem_req,
  output logic                 mem_we,
  output logic [OFS_W-1:0]     mem_addr,   // word aligned: bits [1:0] are zero, lanes in mem_be
  output logic [31:0]          mem_wdata,
  output logic [3:0]           mem_be,
  input  logic [2:0][31:0]     mem_rdata,
  // status to the control interface
  output logic [PC_W-1:0]      pc,
  output logic                 ir_valid,
  output logic                 retire,
  output logic                 halt,
  // debug read of internal state: 0..31 RF, 32 RA, 33 {B1, B0}
  input  logic [5:0]           dbg_sel,
  output logic [31:0]          dbg_data
);

  // ---------------- fetch ----------------
  logic [PC_W-1:0] f_pc, ir_pc, fetch_addr, jump_target;
  logic            first, jump;
  logic [31:0]     ra, imm_reg;
  logic [INSTR_W-1:0] ir;
  logic            exec, limm;

  assign ir         = imem_rdata;
  assign exec       = en && ir_valid;
  assign limm       = ir[INSTR_W-1];
  assign fetch_addr = first ? start_addr : f_pc;
  assign imem_en    = en;
  assign imem_addr  = fetch_addr;
  assign pc         = ir_valid ? ir_pc : fetch_addr;
  assign retire     = exec;

  // ---------------- move decode ----------------
  logic [NUM_BUS-1:0]           active;
  logic [NUM_BUS-1:0][31:0]     val;
  logic [NUM_BUS-1:0][8:0]      src;
  logic [NUM_BUS-1:0][9:0]      dst;
  logic [NUM_BUS-1:0][1:0]      grd;
  // one RF read port per bus plus one for the debug read
  logic [NUM_BUS:0][4:0]        rf_ridx;
  logic [NUM_BUS:0][31:0]       rf_rdata;
  logic [1:0][0:0]              b_rdata;
  logic [31:0] alu0_r, alu1_r, mul_r, lsu_r;

  // Register-file read index of each bus: the source field's index bits.
  for (genvar s = 0; s < NUM_BUS; s++) begin : g_ridx
    assign rf_ridx[s] = ir[SLOT_W*s + 10 +: 5];
  end
  assign rf_ridx[NUM_BUS] = dbg_sel[4:0];

  always_comb begin
    for (int s = 0; s < NUM_BUS; s++) begin
      logic [SLOT_W-1:0] slot;
      logic g_ok;
      slot       = ir[SLOT_W*s +: SLOT_W];
      grd[s]     = slot[20:19];
      src[s]     = slot[18:10];
      dst[s]     = slot[9:0];
      unique case (guard_e'(grd[s]))
        G_ALWAYS: g_ok = 1'b1;
        G_B0:     g_ok = b_rdata[0][0];
        G_NB0:    g_ok = !b_rdata[0][0];
        G_B1:     g_ok = b_rdata[1][0];
        default:  g_ok = 1'b1;
      endcase
      active[s] = exec && g_ok && !(limm && s != 0) && (dst_unit_e'(dst[s][9:6]) != D_NONE);
      if (src[s][8]) begin
        val[s] = 32'($signed(src[s][7:0]));
      end else begin
        unique case (src_unit_e'(src[s][7:5]))
          S_RF:    val[s] = rf_rdata[s];
          S_ALU0:  val[s] = alu0_r;
          S_ALU1:  val[s] = alu1_r;
          S_MUL:   val[s] = mul_r;
          S_LSU:   val[s] = lsu_r;
          S_RA:    val[s] = ra;
          S_IMM:   val[s] = imm_reg;
          S_BOOL:  val[s] = {31'd0, b_rdata[src[s][0]][0]};
          default: val[s] = '0;
        endcase
      end
    end
  end

  // ---------------- destination routing ----------------
  // Per function unit: operand write, trigger write, data and opcode.
  // Index: 0 ALU0, 1 ALU1, 2 MUL, 3 LSU, 4 GCU.
  localparam int unsigned NFU = 5;
  logic [NFU-1:0]       fu_owe, fu_twe;
  logic [NFU-1:0][31:0] fu_odata, fu_tdata;
  logic [NFU-1:0][4:0]  fu_top;
  logic [NUM_BUS-1:0]   rf_we, b_we;
  logic [NUM_BUS-1:0][4:0] rf_widx;
  logic [NUM_BUS-1:0][0:0] b_widx, b_wdata;

  always_comb begin
    fu_owe   = '0;
    fu_twe   = '0;
    fu_odata = '0;
    fu_tdata = '0;
    fu_top   = '0;
    for (int s = 0; s < NUM_BUS; s++) begin
      dst_unit_e u;
      int fu;
      u          = dst_unit_e'(dst[s][9:6]);
      rf_we[s]   = active[s] && (u == D_RF);
      rf_widx[s] = dst[s][4:0];
      b_we[s]    = active[s] && (u == D_BOOL);
      b_widx[s]  = dst[s][0];
      b_wdata[s] = val[s][0];
      unique case (u)
        D_ALU0:  fu = 0;
        D_ALU1:  fu = 1;
        D_MUL:   fu = 2;
        D_LSU:   fu = 3;
        D_GCU:   fu = 4;
        default: fu = -1;
      endcase
      if (active[s] && fu >= 0) begin
        if (dst[s][5]) begin
          fu_twe[fu]   = 1'b1;
          fu_tdata[fu] = val[s];
          fu_top[fu]   = dst[s][4:0];
        end else begin
          fu_owe[fu]   = 1'b1;
          fu_odata[fu] = val[s];
        end
      end
    end
  end

  // ---------------- control unit ----------------
  always_comb begin
    jump        = fu_twe[4] && (gcu_op_e'(fu_top[4]) == GCU_JUMP || gcu_op_e'(fu_top[4]) == GCU_CALL);
    halt        = fu_twe[4] && (gcu_op_e'(fu_top[4]) == GCU_HALT);
    jump_target = fu_tdata[4][PC_W-1:0];
  end

  always_ff @(posedge clk or negedge core_rst_n) begin
    if (!core_rst_n) begin
      f_pc     <= '0;
      ir_pc    <= '0;
      first    <= 1'b1;
      ir_valid <= 1'b0;
      ra       <= '0;
      imm_reg  <= '0;
    end else if (en) begin
      ir_pc    <= fetch_addr;
      ir_valid <= 1'b1;
      first    <= 1'b0;
      f_pc     <= jump ? jump_target : fetch_addr + 1'b1;
      if (fu_owe[4]) ra <= fu_odata[4];
      if (fu_twe[4] && gcu_op_e'(fu_top[4]) == GCU_CALL) ra <= 32'(ir_pc) + 32'd2;
      if (exec && limm) imm_reg <= ir[LIMM_LSB +: 32];
    end
  end

  // ---------------- register files ----------------
  tta_rf #(.W(32), .NREGS(32), .NR(NUM_BUS + 1), .NW(NUM_BUS)) u_rf (
    .clk, .rst_n(core_rst_n), .en,
    .rd_idx(rf_ridx), .rd_data(rf_rdata),
    .wr_en(rf_we), .wr_idx(rf_widx), .wr_data(val)
  );

  tta_rf #(.W(1), .NREGS(2), .NR(2), .NW(NUM_BUS)) u_bool (
    .clk, .rst_n(core_rst_n), .en,
    .rd_idx({1'b1, 1'b0}), .rd_data(b_rdata),
    .wr_en(b_we), .wr_idx(b_widx), .wr_data(b_wdata)
  );

  // Debug read, combinational; meant to be read while the core is in break.
  always_comb begin
    if (!dbg_sel[5])          dbg_data = rf_rdata[NUM_BUS];
    else if (dbg_sel == 6'd32) dbg_data = ra;
    else if (dbg_sel == 6'd33) dbg_data = {30'd0, b_rdata[1], b_rdata[0]};
    else                      dbg_data = '0;
  end

  // ---------------- function units ----------------
  tta_alu u_alu0 (
    .clk, .rst_n(core_rst_n), .en,
    .o_we(fu_owe[0]), .o_data(fu_odata[0]),
    .t_we(fu_twe[0]), .t_data(fu_tdata[0]), .t_op(fu_top[0]),
    .r_data(alu0_r)
  );

  tta_alu u_alu1 (
    .clk, .rst_n(core_rst_n), .en,
    .o_we(fu_owe[1]), .o_data(fu_odata[1]),
    .t_we(fu_twe[1]), .t_data(fu_tdata[1]), .t_op(fu_top[1]),
    .r_data(alu1_r)
  );

  tta_mul u_mul (
    .clk, .rst_n(core_rst_n), .en,
    .o_we(fu_owe[2]), .o_data(fu_odata[2]),
    .t_we(fu_twe[2]), .t_data(fu_tdata[2]), .t_op(fu_top[2]),
    .r_data(mul_r)
  );

  tta_lsu #(.OFS_W(OFS_W)) u_lsu (
    .clk, .rst_n(core_rst_n), .en,
    .o_we(fu_owe[3]), .o_data(fu_odata[3]),
    .t_we(fu_twe[3]), .t_data(fu_tdata[3]), .t_op(fu_top[3]),
    .r_data(lsu_r),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_be, .mem_rdata
  );

endmodule
