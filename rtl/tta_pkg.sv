// tta_pkg: instruction format and operation codes of the transport-triggered
// (TTA) accelerator core.
//
// A TTA instruction does not name operations; it names data transports
// ("moves"). Each transport bus carries one move per cycle from a source
// (register, function-unit result port, immediate) to a destination
// (register, function-unit operand port or trigger port). A move into a
// trigger port carries an opcode and starts the operation, for example
// "LSU.R -> ALU0.T.ADD". This follows the TTA organisation the accelerator
// is built on; the exact bit layout below is this design's own.
//
// Instruction word (64 bits, 8 bytes per instruction):
//   [63]     template: 0 = three moves, 1 = one move plus a long immediate
//   [20:0]   move slot 0 (bus 0)
//   [41:21]  move slot 1 (bus 1)           | when [63]=1: [52:21] is a 32-bit
//   [62:42]  move slot 2 (bus 2)           | immediate loaded into IMM.R
// Move slot (21 bits): {guard[1:0], src[8:0], dst[9:0]}
//   guard: 00 always, 01 if B0, 10 if not B0, 11 if B1
//   src:   [8]=1 -> 8-bit signed short immediate in [7:0]
//          [8]=0 -> unit [7:5], index [4:0] (see src_unit_e)
//   dst:   unit [9:6] (see dst_unit_e); for function units [5]=1 selects
//          the trigger port with opcode [4:0], [5]=0 the operand port.
package tta_pkg;

  localparam int unsigned INSTR_W  = 64;
  localparam int unsigned NUM_BUS  = 3;
  localparam int unsigned SLOT_W   = 21;
  localparam int unsigned LIMM_LSB = 21;

  typedef enum logic [1:0] {
    G_ALWAYS = 2'b00,
    G_B0     = 2'b01,
    G_NB0    = 2'b10,
    G_B1     = 2'b11
  } guard_e;

  typedef enum logic [2:0] {
    S_RF   = 3'd0,
    S_ALU0 = 3'd1,
    S_ALU1 = 3'd2,
    S_MUL  = 3'd3,
    S_LSU  = 3'd4,
    S_RA   = 3'd5,
    S_IMM  = 3'd6,
    S_BOOL = 3'd7
  } src_unit_e;

  typedef enum logic [3:0] {
    D_NONE = 4'd0,
    D_RF   = 4'd1,
    D_BOOL = 4'd2,
    D_ALU0 = 4'd3,
    D_ALU1 = 4'd4,
    D_MUL  = 4'd5,
    D_LSU  = 4'd6,
    D_GCU  = 4'd7
  } dst_unit_e;

  // ALU opcodes: result = op(trigger, operand).
  typedef enum logic [4:0] {
    ALU_ADD  = 5'd0,
    ALU_SUB  = 5'd1,
    ALU_AND  = 5'd2,
    ALU_IOR  = 5'd3,
    ALU_XOR  = 5'd4,
    ALU_SHL  = 5'd5,
    ALU_SHR  = 5'd6,
    ALU_SHRU = 5'd7,
    ALU_EQ   = 5'd8,
    ALU_GT   = 5'd9,
    ALU_GTU  = 5'd10,
    ALU_SXQW = 5'd11,
    ALU_SXHW = 5'd12,
    ALU_MIN  = 5'd13,
    ALU_MAX  = 5'd14,
    ALU_MINU = 5'd15,
    ALU_MAXU = 5'd16
  } alu_op_e;

  // LSU opcodes: trigger = byte address, operand = store data.
  typedef enum logic [4:0] {
    LSU_LDW  = 5'd0,
    LSU_LDH  = 5'd1,
    LSU_LDHU = 5'd2,
    LSU_LDQ  = 5'd3,
    LSU_LDQU = 5'd4,
    LSU_STW  = 5'd5,
    LSU_STH  = 5'd6,
    LSU_STQ  = 5'd7
  } lsu_op_e;

  // Control unit opcodes: trigger = target instruction address.
  // One delay slot: the instruction after a jump or call always executes.
  typedef enum logic [4:0] {
    GCU_JUMP = 5'd0,
    GCU_CALL = 5'd1,
    GCU_HALT = 5'd2
  } gcu_op_e;

  localparam int unsigned ALU_LATENCY = 2;
  localparam int unsigned MUL_LATENCY = 3;
  localparam int unsigned LSU_LATENCY = 3;

  // Encoding helpers, usable by program generators and testbenches.
  function automatic logic [8:0] src_reg(src_unit_e u, int unsigned idx);
    return {1'b0, u, 5'(idx)};
  endfunction

  function automatic logic [8:0] src_simm(int v);
    return {1'b1, 8'(v)};
  endfunction

  function automatic logic [9:0] dst_reg(dst_unit_e u, int unsigned idx);
    return {u, 1'b0, 5'(idx)};
  endfunction

  function automatic logic [9:0] dst_op(dst_unit_e u);  // operand port
    return {u, 6'd0};
  endfunction

  function automatic logic [9:0] dst_trig(dst_unit_e u, logic [4:0] opc);  // trigger port
    return {u, 1'b1, opc};
  endfunction

  function automatic logic [SLOT_W-1:0] move(guard_e g, logic [8:0] s, logic [9:0] d);
    return {g, s, d};
  endfunction

  localparam logic [SLOT_W-1:0] NOP_MOVE = {G_ALWAYS, 9'd0, D_NONE, 6'd0};

  function automatic logic [INSTR_W-1:0] instr3(logic [SLOT_W-1:0] m0, logic [SLOT_W-1:0] m1,
                                                 logic [SLOT_W-1:0] m2);
    return {1'b0, m2, m1, m0};
  endfunction

  function automatic logic [INSTR_W-1:0] instr_limm(logic [SLOT_W-1:0] m0, logic [31:0] imm);
    return {1'b1, 10'd0, imm, m0};
  endfunction

endpackage
