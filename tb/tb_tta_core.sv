// tb_tta_core: self-checking program-level test of the TTA core.
//
// The testbench owns the instruction memory and the three data memories
// (one-cycle read latency). The program covers three parallel moves per
// instruction, the long immediate, both ALUs at once, the multiplier,
// guarded moves (B0, !B0, B1), a counted loop summing a DMEM array, a call
// and return with delay slots, stores and loads of every size to the
// scratchpad and PMEM, and HALT. At the end the program stores its
// registers to DMEM, where they are compared with values worked out here.
// The program runs twice: with en always high (one instruction per cycle:
// the cycle count must equal the instruction count plus one fetch bubble,
// and the instruction count must match the program's path) and with random
// stall cycles (same results, same instruction count).
`timescale 1ns / 1ps
module tb_tta_core;
  import tta_pkg::*;
  import tb_tta_asm_pkg::*;

  localparam int PC_W = 10, OFS_W = 15;

  logic clk = 0, core_rst_n = 0, en = 0;
  logic [PC_W-1:0] start_addr = 0, imem_addr, pc;
  logic imem_en, ir_valid, retire, halt;
  logic [63:0] imem_rdata;
  logic [2:0] mem_req;
  logic mem_we;
  logic [OFS_W-1:0] mem_addr;
  logic [31:0] mem_wdata;
  logic [3:0] mem_be;
  logic [2:0][31:0] mem_rdata;
  logic [5:0] dbg_sel = 0;
  logic [31:0] dbg_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tta_core #(.PC_W(PC_W), .OFS_W(OFS_W)) dut (.*);

  logic [63:0] imem [1024];
  logic [31:0] dmem [3][1024];   // 0 spm, 1 dmem, 2 pmem (4 KB each here)
  always_ff @(posedge clk) begin
    if (imem_en) imem_rdata <= imem[imem_addr];
    for (int t = 0; t < 3; t++) begin
      if (mem_req[t]) begin
        mem_rdata[t] <= dmem[t][mem_addr[11:2]];
        if (mem_we)
          for (int i = 0; i < 4; i++)
            if (mem_be[i]) dmem[t][mem_addr[11:2]][8*i +: 8] <= mem_wdata[8*i +: 8];
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
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
  int loop_start, loop_end, call_idx, sub_start, sub_len, halt_idx, expected_retired;
  logic [31:0] arr [10];
  logic [31:0] exp_reg [32];

  function automatic void build();
    a = new();
    a.emit(instr3(move(G_ALWAYS, src_simm(5), dst_reg(D_RF, 1)),
                  move(G_ALWAYS, src_simm(-3), dst_reg(D_RF, 2)),
                  move(G_ALWAYS, src_simm(100), dst_reg(D_RF, 3))));
    a.emit(instr_limm(move(G_ALWAYS, src_simm(7), dst_reg(D_RF, 4)), 32'hDEAD_BEEF));
    a.mv1(move(G_ALWAYS, src_reg(S_IMM, 0), dst_reg(D_RF, 5)));
    a.emit(instr3(move(G_ALWAYS, src_reg(S_RF, 2), dst_op(D_ALU0)),
                  move(G_ALWAYS, src_reg(S_RF, 1), dst_trig(D_ALU0, ALU_SUB)),
                  move(G_ALWAYS, src_reg(S_RF, 3), dst_trig(D_ALU1, ALU_SXQW))));
    a.nop();
    a.emit(instr3(move(G_ALWAYS, src_reg(S_ALU0, 0), dst_reg(D_RF, 6)),
                  move(G_ALWAYS, src_reg(S_ALU1, 0), dst_reg(D_RF, 7)), NOP_MOVE));
    a.mul(8, 5, 3);
    a.cmp(ALU_EQ, 1, 1, 1);        // B1 = 1
    a.cmp(ALU_GT, 0, 2, 1);        // B0 = (-3 > 5) = 0
    a.emit(instr3(move(G_B1, src_simm(11), dst_reg(D_RF, 9)),
                  move(G_B0, src_simm(12), dst_reg(D_RF, 10)),
                  move(G_NB0, src_simm(13), dst_reg(D_RF, 11))));
    // sum of 10 words at DMEM
    a.li(12, CORE_DMEM);
    a.li(13, 0);
    a.li(14, 10);
    loop_start = a.here();
    a.ld(LSU_LDW, 15, 12);
    a.alu(ALU_ADD, 13, 13, 15);
    a.alui(ALU_ADD, 12, 12, 4);
    a.alui(ALU_SUB, 14, 14, 1);
    a.cmp(ALU_GT, 0, 14, 0);
    a.jump(loop_start, G_B0);
    loop_end = a.here();
    a.li(16, CORE_DMEM + 32'h100);
    a.st(LSU_STW, 16, 13);
    // scratchpad half-word and byte
    a.li(17, CORE_SPM + 32'h40);
    a.li(18, -2);
    a.st(LSU_STH, 17, 18);
    a.ld(LSU_LDHU, 19, 17);
    a.ld(LSU_LDH, 20, 17);
    a.alui(ALU_ADD, 17, 17, 3);
    a.st(LSU_STQ, 17, 3);
    a.ld(LSU_LDQ, 28, 17);           // 100
    // parameter memory
    a.li(21, CORE_PMEM);
    a.ld(LSU_LDW, 22, 21);
    // call with delay slot
    call_idx = a.here();
    a.emit(instr_limm(NOP_MOVE, 32'd0));   // target patched below
    a.mv1(move(G_ALWAYS, src_reg(S_IMM, 0), dst_trig(D_GCU, GCU_CALL)));
    a.mv1(move(G_ALWAYS, src_simm(1), dst_reg(D_RF, 23)));   // delay slot
    a.mv1(move(G_ALWAYS, src_simm(2), dst_reg(D_RF, 24)));   // after return
    // dump r1..r28 to DMEM+0x200
    a.li(27, CORE_DMEM + 32'h200);
    a.li(29, CORE_DMEM + 32'h200);
    for (int r = 1; r <= 28; r++) begin
      a.st(LSU_STW, 29, r);
      a.alui(ALU_ADD, 29, 29, 4);
    end
    halt_idx = a.here();
    a.halt();
    sub_start = a.here();
    a.alu(ALU_ADD, 25, 6, 6);
    a.mv1(move(G_ALWAYS, src_reg(S_RA, 0), dst_trig(D_GCU, GCU_JUMP)));
    a.mv1(move(G_ALWAYS, src_simm(3), dst_reg(D_RF, 26)));   // delay slot
    sub_len = a.here() - sub_start;
    a.prog[call_idx] = instr_limm(NOP_MOVE, 32'(sub_start));
    // path length: main once, loop body nine more times, the subroutine once
    expected_retired = (halt_idx + 1) + 9 * (loop_end - loop_start) + sub_len;
  endfunction

  int cycles, retired;
  task automatic run(bit stalls, output int ncyc, output int nret);
    core_rst_n = 0;
    en = 0;
    for (int i = 0; i < 1024; i++) begin
      dmem[0][i] = 0; dmem[1][i] = 0; dmem[2][i] = 0;
    end
    for (int i = 0; i < 10; i++) dmem[1][i] = arr[i];
    dmem[2][0] = 32'h1234_5678;
    repeat (2) @(negedge clk);
    core_rst_n = 1;
    @(negedge clk);
    ncyc = 0;
    nret = 0;
    forever begin
      en = stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      if (en) ncyc++;
      if (retire) nret++;
      if (halt) break;
      @(negedge clk);
    end
    @(negedge clk);
    en = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    build();
    foreach (imem[i]) imem[i] = instr3(NOP_MOVE, NOP_MOVE, NOP_MOVE);
    foreach (a.prog[i]) imem[i] = a.prog[i];
    for (int i = 0; i < 10; i++) arr[i] = $urandom;
    foreach (exp_reg[i]) exp_reg[i] = 0;
    exp_reg[1] = 5; exp_reg[2] = -3; exp_reg[3] = 100; exp_reg[4] = 7;
    exp_reg[5] = 32'hDEAD_BEEF; exp_reg[6] = 8; exp_reg[7] = 100;
    exp_reg[8] = 32'hDEAD_BEEF * 100;
    exp_reg[9] = 11; exp_reg[10] = 0; exp_reg[11] = 13;
    exp_reg[12] = CORE_DMEM + 40;
    exp_reg[13] = 0; for (int i = 0; i < 10; i++) exp_reg[13] += arr[i];
    exp_reg[14] = 0; exp_reg[15] = arr[9];
    exp_reg[16] = CORE_DMEM + 32'h100;
    exp_reg[17] = CORE_SPM + 32'h43; exp_reg[18] = -2;
    exp_reg[19] = 32'h0000_FFFE; exp_reg[20] = 32'hFFFF_FFFE;
    exp_reg[21] = CORE_PMEM; exp_reg[22] = 32'h1234_5678;
    exp_reg[23] = 1; exp_reg[24] = 2; exp_reg[25] = 16; exp_reg[26] = 3;
    exp_reg[27] = CORE_DMEM + 32'h200; exp_reg[28] = 100;

    for (int pass = 0; pass < 2; pass++) begin
      run(pass == 1, cycles, retired);
      for (int r = 1; r <= 28; r++)
        chk(dmem[1][128 + r - 1], exp_reg[r], $sformatf("pass %0d r%0d", pass, r));
      chk(dmem[1][64], exp_reg[13], $sformatf("pass %0d stored sum", pass));
      chk(dmem[0][16], 32'h6400_FFFE, $sformatf("pass %0d scratchpad word", pass));
      // the same registers through the debug read of the stopped core
      for (int r = 1; r <= 28; r++) begin
        dbg_sel = 6'(r);
        #1;
        chk(dbg_data, exp_reg[r], $sformatf("pass %0d debug read r%0d", pass, r));
      end
      dbg_sel = 6'd40;
      #1;
      chk(dbg_data, 0, "debug read of an unused selector");
      chk(32'(retired), 32'(expected_retired), $sformatf("pass %0d instructions executed", pass));
      if (pass == 0) chk(32'(cycles), 32'(retired + 1), "one instruction per cycle");
      chk(32'(pc), 32'(halt_idx + 1), $sformatf("pass %0d pc after halt", pass));
    end
    $display("program %0d instructions, %0d executed, %0d cycles", a.prog.size(), retired, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
