// tb_tta_lsu: self-checking test of the TTA load/store unit.
// The three memory ports are served by testbench RAMs with a one-cycle read
// latency. Random stores and loads of words, halves and bytes (signed and
// unsigned) go to the scratchpad, DMEM, PMEM and the unmapped section, and
// are checked against a byte-array model: a load's value must appear on R
// exactly three enabled cycles after its trigger, with random stalls.
`timescale 1ns / 1ps
module tb_tta_lsu;
  import tta_pkg::*;
  localparam int OFS_W = 10;   // 1 KB per section in this test

  logic clk = 0, rst_n = 0, en = 0;
  logic o_we = 0, t_we = 0;
  logic [31:0] o_data = 0, t_data = 0, r_data;
  logic [4:0] t_op = 0;
  logic [2:0] mem_req;
  logic mem_we;
  logic [OFS_W-1:0] mem_addr;
  logic [31:0] mem_wdata;
  logic [3:0] mem_be;
  logic [2:0][31:0] mem_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tta_lsu #(.OFS_W(OFS_W)) dut (.*);

  // testbench memories: 3 x 256 words
  logic [31:0] tbmem [3][256];
  always_ff @(posedge clk) begin
    for (int t = 0; t < 3; t++) begin
      if (mem_req[t]) begin
        mem_rdata[t] <= tbmem[t][mem_addr[OFS_W-1:2]];
        if (mem_we)
          for (int i = 0; i < 4; i++)
            if (mem_be[i]) tbmem[t][mem_addr[OFS_W-1:2]][8*i +: 8] <= mem_wdata[8*i +: 8];
      end
    end
  end

  byte unsigned model [4][1024];   // index = section code

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int stalls);
    repeat (stalls) begin en = 0; @(negedge clk); end
    en = 1;
    @(negedge clk);
  endtask

  task automatic check(logic [31:0] exp, string what);
    checks++;
    if (r_data !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, r_data, exp);
    end
  endtask

  logic [31:0] addr, data, exp, prev;
  logic [1:0] sec;
  lsu_op_e op;
  int b;
  initial begin
    for (int t = 0; t < 3; t++) for (int i = 0; i < 256; i++) tbmem[t][i] = 0;
    foreach (model[s, i]) model[s][i] = 0;
    mem_rdata = '0;
    @(negedge clk);
    rst_n = 1;
    prev = 0;
    for (int n = 0; n < 3000; n++) begin
      sec  = 2'($urandom);
      op   = lsu_op_e'($urandom_range(0, 7));
      addr = {15'($urandom), sec, 5'd0, 10'($urandom)};
      addr[OFS_W+1:OFS_W] = sec;
      if (op == LSU_LDW || op == LSU_STW) addr[1:0] = 0;
      if (op == LSU_LDH || op == LSU_LDHU || op == LSU_STH) addr[0] = 0;
      data = $urandom;
      b = int'(addr[OFS_W-1:0]);
      o_we = 1; o_data = data;
      t_we = 1; t_data = addr; t_op = op;
      step(0);
      o_we = 0; t_we = 0;
      case (op)
        LSU_STW: if (sec != 2'b01) for (int i = 0; i < 4; i++) model[sec][b+i] = data[8*i +: 8];
        LSU_STH: if (sec != 2'b01) for (int i = 0; i < 2; i++) model[sec][b+i] = data[8*i +: 8];
        LSU_STQ: if (sec != 2'b01) model[sec][b] = data[7:0];
        default: ;
      endcase
      exp = prev;
      case (op)
        LSU_LDW:  exp = {model[sec][b+3], model[sec][b+2], model[sec][b+1], model[sec][b]};
        LSU_LDH:  exp = {{16{model[sec][b+1][7]}}, model[sec][b+1], model[sec][b]};
        LSU_LDHU: exp = {16'd0, model[sec][b+1], model[sec][b]};
        LSU_LDQ:  exp = {{24{model[sec][b][7]}}, model[sec][b]};
        LSU_LDQU: exp = {24'd0, model[sec][b]};
        default: ;
      endcase
      if (sec == 2'b01 && op <= LSU_LDQU) exp = 0;
      check(prev, "R before latency (1)");
      step($urandom_range(0, 2));
      check(prev, "R before latency (2)");
      step($urandom_range(0, 2));
      check(exp, $sformatf("%s at %h", op.name(), addr));
      prev = exp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
