// tb_tta_asm_pkg: a small assembler for the TTA core, and the image kernels
// used by the testbenches.
//
// TtaAsm collects 64-bit instructions. The pseudo-operations below expand to
// plain sequential code: each operation is triggered, followed by enough
// empty instructions to cover the unit's latency, and then its result is
// moved to a register. Jumps load the target into the long-immediate
// register and fill the delay slot with an empty instruction. This is slow
// code, but easy to check; the core testbench also hand-packs parallel moves.
//
// Kernels (all on 8-bit pixels, interior pixels only, row-major, width W):
//   blur3x3: out = (sum of the 3x3 neighbourhood) / 9, done as
//            (sum * 7282) >> 16, exact for sums up to 9*255
//   sobel:   out = min(255, |gx| + |gy|) with the usual 3x3 Sobel masks
// Parameter block, by default at the start of PMEM (core address 0x18000):
// W, H, input byte address, output byte address (core addresses). A
// program can be placed anywhere in IMEM by giving TtaAsm its origin.
// build_server makes a kernel that never halts and takes jobs from a
// command word in PMEM (the document's "command queue"); its layout is
// this package's own.
package tb_tta_asm_pkg;
  import tta_pkg::*;

  localparam logic [31:0] CORE_SPM  = 32'h0000_0000;
  localparam logic [31:0] CORE_DMEM = 32'h0001_0000;
  localparam logic [31:0] CORE_PMEM = 32'h0001_8000;

  class TtaAsm;
    logic [63:0] prog[$];
    int org;  // instruction address of prog[0]

    function new(int origin = 0);
      org = origin;
    endfunction

    function int here();
      return org + prog.size();
    endfunction

    function void emit(logic [63:0] w);
      prog.push_back(w);
    endfunction

    function void nop(int n = 1);
      repeat (n) emit(instr3(NOP_MOVE, NOP_MOVE, NOP_MOVE));
    endfunction

    function void mv1(logic [20:0] m);
      emit(instr3(m, NOP_MOVE, NOP_MOVE));
    endfunction

    // rd = value (short immediate when it fits, else long immediate)
    function void li(int rd, logic [31:0] v);
      if ($signed(v) >= -128 && $signed(v) <= 127) begin
        mv1(move(G_ALWAYS, src_simm(int'(v)), dst_reg(D_RF, rd)));
      end else begin
        emit(instr_limm(NOP_MOVE, v));
        mv1(move(G_ALWAYS, src_reg(S_IMM, 0), dst_reg(D_RF, rd)));
      end
    endfunction

    function void mov(int rd, int rs);
      mv1(move(G_ALWAYS, src_reg(S_RF, rs), dst_reg(D_RF, rd)));
    endfunction

    // rd = ra op rb on ALU0
    function void alu(alu_op_e op, int rd, int ra, int rb);
      emit(instr3(move(G_ALWAYS, src_reg(S_RF, rb), dst_op(D_ALU0)),
                  move(G_ALWAYS, src_reg(S_RF, ra), dst_trig(D_ALU0, op)), NOP_MOVE));
      nop(ALU_LATENCY - 1);
      mv1(move(G_ALWAYS, src_reg(S_ALU0, 0), dst_reg(D_RF, rd)));
    endfunction

    // rd = ra op imm8 on ALU1
    function void alui(alu_op_e op, int rd, int ra, int imm);
      emit(instr3(move(G_ALWAYS, src_simm(imm), dst_op(D_ALU1)),
                  move(G_ALWAYS, src_reg(S_RF, ra), dst_trig(D_ALU1, op)), NOP_MOVE));
      nop(ALU_LATENCY - 1);
      mv1(move(G_ALWAYS, src_reg(S_ALU1, 0), dst_reg(D_RF, rd)));
    endfunction

    // B[b] = (ra op rb)[0]
    function void cmp(alu_op_e op, int b, int ra, int rb);
      emit(instr3(move(G_ALWAYS, src_reg(S_RF, rb), dst_op(D_ALU0)),
                  move(G_ALWAYS, src_reg(S_RF, ra), dst_trig(D_ALU0, op)), NOP_MOVE));
      nop(ALU_LATENCY - 1);
      mv1(move(G_ALWAYS, src_reg(S_ALU0, 0), dst_reg(D_BOOL, b)));
    endfunction

    function void mul(int rd, int ra, int rb);
      emit(instr3(move(G_ALWAYS, src_reg(S_RF, rb), dst_op(D_MUL)),
                  move(G_ALWAYS, src_reg(S_RF, ra), dst_trig(D_MUL, 5'd0)), NOP_MOVE));
      nop(MUL_LATENCY - 1);
      mv1(move(G_ALWAYS, src_reg(S_MUL, 0), dst_reg(D_RF, rd)));
    endfunction

    function void ld(lsu_op_e op, int rd, int raddr);
      mv1(move(G_ALWAYS, src_reg(S_RF, raddr), dst_trig(D_LSU, op)));
      nop(LSU_LATENCY - 1);
      mv1(move(G_ALWAYS, src_reg(S_LSU, 0), dst_reg(D_RF, rd)));
    endfunction

    function void st(lsu_op_e op, int raddr, int rdata);
      emit(instr3(move(G_ALWAYS, src_reg(S_RF, rdata), dst_op(D_LSU)),
                  move(G_ALWAYS, src_reg(S_RF, raddr), dst_trig(D_LSU, op)), NOP_MOVE));
    endfunction

    // Jump to target when guard g holds; the delay slot is left empty.
    function void jump(int target, guard_e g = G_ALWAYS);
      emit(instr_limm(NOP_MOVE, 32'(target)));
      mv1(move(g, src_reg(S_IMM, 0), dst_trig(D_GCU, GCU_JUMP)));
      nop();
    endfunction

    function void halt();
      mv1(move(G_ALWAYS, src_simm(0), dst_trig(D_GCU, GCU_HALT)));
      nop();
    endfunction
  endclass

  // Register use of the kernels:
  //  r1 W, r2 H, r3 in, r4 out, r5 y, r6 x, r13 W-1, r14 H-1, r15 scratch
  //  r16..r24 the 3x3 window p[row][col] = r16 + 3*row + col
  function automatic void kernel_prologue(TtaAsm a, logic [31:0] pbase);
    a.li(15, pbase);
    a.ld(LSU_LDW, 1, 15);
    a.alui(ALU_ADD, 15, 15, 4);
    a.ld(LSU_LDW, 2, 15);
    a.alui(ALU_ADD, 15, 15, 4);
    a.ld(LSU_LDW, 3, 15);
    a.alui(ALU_ADD, 15, 15, 4);
    a.ld(LSU_LDW, 4, 15);
    a.alui(ALU_SUB, 13, 1, 1);
    a.alui(ALU_SUB, 14, 2, 1);
    a.li(5, 1);
  endfunction

  // Loads the 3x3 window around (x = r6, y = r5) into r16..r24.
  function automatic void load_window(TtaAsm a);
    a.alui(ALU_SUB, 8, 5, 1);      // y-1
    a.mul(8, 8, 1);                // (y-1)*W
    a.alu(ALU_ADD, 7, 3, 8);
    a.alu(ALU_ADD, 7, 7, 6);
    a.alui(ALU_SUB, 7, 7, 1);      // &in[y-1][x-1]
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < 3; c++) begin
        a.ld(LSU_LDQU, 16 + 3 * r + c, 7);
        if (c < 2) a.alui(ALU_ADD, 7, 7, 1);
      end
      a.alui(ALU_SUB, 7, 7, 2);
      a.alu(ALU_ADD, 7, 7, 1);
    end
  endfunction

  // Stores r10 at out[y][x].
  function automatic void store_pixel(TtaAsm a);
    a.mul(12, 5, 1);
    a.alu(ALU_ADD, 12, 12, 4);
    a.alu(ALU_ADD, 12, 12, 6);
    a.st(LSU_STQ, 12, 10);
  endfunction

  function automatic void kernel_loops(TtaAsm a, bit sobel, bit do_halt = 1'b1);
    int loop_y, loop_x;
    a.li(11, 7282);
    loop_y = a.here();
    a.li(6, 1);
    loop_x = a.here();
    load_window(a);
    if (!sobel) begin
      a.alu(ALU_ADD, 9, 16, 17);
      for (int i = 18; i <= 24; i++) a.alu(ALU_ADD, 9, 9, i);
      a.mul(10, 9, 11);
      a.alui(ALU_SHRU, 10, 10, 16);
    end else begin
      // gx = (p02 + 2 p12 + p22) - (p00 + 2 p10 + p20)
      a.alu(ALU_ADD, 9, 18, 24);
      a.alu(ALU_ADD, 9, 9, 21);
      a.alu(ALU_ADD, 9, 9, 21);
      a.alu(ALU_SUB, 9, 9, 16);
      a.alu(ALU_SUB, 9, 9, 22);
      a.alu(ALU_SUB, 9, 9, 19);
      a.alu(ALU_SUB, 9, 9, 19);
      // gy = (p20 + 2 p21 + p22) - (p00 + 2 p01 + p02)
      a.alu(ALU_ADD, 10, 22, 24);
      a.alu(ALU_ADD, 10, 10, 23);
      a.alu(ALU_ADD, 10, 10, 23);
      a.alu(ALU_SUB, 10, 10, 16);
      a.alu(ALU_SUB, 10, 10, 18);
      a.alu(ALU_SUB, 10, 10, 17);
      a.alu(ALU_SUB, 10, 10, 17);
      // |gx| + |gy|, saturated
      a.li(15, 0);
      a.alu(ALU_SUB, 12, 15, 9);
      a.alu(ALU_MAX, 9, 9, 12);
      a.alu(ALU_SUB, 12, 15, 10);
      a.alu(ALU_MAX, 10, 10, 12);
      a.alu(ALU_ADD, 10, 10, 9);
      a.li(15, 255);
      a.alu(ALU_MINU, 10, 10, 15);
    end
    store_pixel(a);
    a.alui(ALU_ADD, 6, 6, 1);
    a.cmp(ALU_GT, 0, 13, 6);       // B0 = (W-1) > x
    a.jump(loop_x, G_B0);
    a.alui(ALU_ADD, 5, 5, 1);
    a.cmp(ALU_GT, 0, 14, 5);       // B0 = (H-1) > y
    a.jump(loop_y, G_B0);
    if (do_halt) a.halt();
  endfunction

  // Job-completion tail of the resident kernel: count the job, clear the
  // command word and go back to waiting.
  function automatic void server_done(TtaAsm a, logic [31:0] pbase, int wait_at);
    a.alui(ALU_ADD, 27, 27, 1);
    a.li(15, pbase + 20);
    a.st(LSU_STW, 15, 27);
    a.st(LSU_STW, 30, 29);
    a.jump(wait_at);
  endfunction

  // Resident kernel that takes its work from a command queue in PMEM and
  // never halts. Layout at pbase: W, H, in, out (as for build_kernel), then
  // +16 command word (0 empty, 1 blur, other sobel, written by the host)
  // and +20 count of finished jobs (written by the kernel). The kernel
  // polls the command word, runs the job on the parameter block, bumps the
  // count and clears the command word. Extra registers: r27 job count,
  // r28 = 1, r29 = 0, r30 address of the command word, r20 the command.
  function automatic void build_server(TtaAsm a, logic [31:0] pbase = CORE_PMEM);
    int wait_at, blur_at;
    TtaAsm t;
    // first pass finds the address of the blur path (a forward jump)
    blur_at = 0;
    for (int pass = 0; pass < 2; pass++) begin
      t = new(a.org);
      t.li(27, 0);
      t.li(28, 1);
      t.li(29, 0);
      t.li(30, pbase + 16);
      wait_at = t.here();
      t.ld(LSU_LDW, 20, 30);
      t.cmp(ALU_EQ, 0, 20, 29);
      t.jump(wait_at, G_B0);
      kernel_prologue(t, pbase);
      t.cmp(ALU_EQ, 0, 20, 28);
      t.jump(blur_at, G_B0);
      kernel_loops(t, 1'b1, 1'b0);
      server_done(t, pbase, wait_at);
      blur_at = t.here();
      kernel_loops(t, 1'b0, 1'b0);
      server_done(t, pbase, wait_at);
    end
    a.prog = t.prog;
  endfunction

  // pbase: core address of the kernel's parameter block
  function automatic void build_kernel(TtaAsm a, bit sobel, logic [31:0] pbase = CORE_PMEM);
    kernel_prologue(a, pbase);
    kernel_loops(a, sobel);
  endfunction

  // Reference models.
  function automatic byte unsigned ref_blur(byte unsigned img[], int w, int x, int y);
    int s;
    s = 0;
    for (int r = -1; r <= 1; r++)
      for (int c = -1; c <= 1; c++) s += img[(y + r) * w + x + c];
    return byte'(s / 9);
  endfunction

  function automatic byte unsigned ref_sobel(byte unsigned img[], int w, int x, int y);
    int gx, gy, m;
    gx = (img[(y-1)*w+x+1] + 2*img[y*w+x+1] + img[(y+1)*w+x+1])
       - (img[(y-1)*w+x-1] + 2*img[y*w+x-1] + img[(y+1)*w+x-1]);
    gy = (img[(y+1)*w+x-1] + 2*img[(y+1)*w+x] + img[(y+1)*w+x+1])
       - (img[(y-1)*w+x-1] + 2*img[(y-1)*w+x] + img[(y-1)*w+x+1]);
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return byte'(m > 255 ? 255 : m);
  endfunction

endpackage
