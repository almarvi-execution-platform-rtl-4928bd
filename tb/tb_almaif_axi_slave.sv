// tb_almaif_axi_slave: self-checking test of the AlmaIF AXI slave front end.
//
// Uses the reference TTA's memory map (15-bit offset, 17-bit accelerator
// address: CTRL at 0x00000, IMEM 0x08000, DMEM 0x10000, PMEM 0x18000) at a
// non-zero base address. Four testbench section memories (one-cycle read
// latency) record what reaches them. Random writes with random byte strobes
// and reads are checked against a model; the address-width rule
// 2 + max(15, 15, 11, 8) = 17 is checked too, and so is the number of
// cycles a read and a write take.
`timescale 1ns / 1ps
module tb_almaif_axi_slave;
  import almaif_pkg::*;
  localparam int OFS_W = 15;
  localparam logic [31:0] BASE = 32'h43C0_0000;

  logic clk = 0, rst_n = 0;
  axi_lite_req_t axi_req;
  axi_lite_resp_t axi_resp;
  logic [3:0] sec_req;
  logic sec_we;
  logic [OFS_W-1:0] sec_ofs;
  logic [3:0] sec_be;
  logic [31:0] sec_wdata;
  logic [3:0][31:0] sec_rdata;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  almaif_axi_slave #(.OFS_W(OFS_W)) dut (.*);
  tb_axi_master bfm (.clk, .req(axi_req), .resp(axi_resp));

  logic [31:0] smem [4][64];   // 64 words per section in this test
  always_ff @(posedge clk) begin
    for (int s = 0; s < 4; s++) begin
      if (sec_req[s]) begin
        sec_rdata[s] <= smem[s][sec_ofs[7:2]];
        if (sec_we)
          for (int i = 0; i < 4; i++) if (sec_be[i]) smem[s][sec_ofs[7:2]][8*i +: 8] <= sec_wdata[8*i +: 8];
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
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

  logic [31:0] model [4][64];
  logic [31:0] d, addr;
  logic [1:0] resp;
  logic [3:0] strb;
  int s, w, t0, t1;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    foreach (smem[i, j]) begin smem[i][j] = 0; model[i][j] = 0; end
    sec_rdata = '0;
    chk(almaif_addr_width(15, 15, 11, CTRL_AW), 17, "address width of the reference map");
    chk(almaif_addr_width(16, 15, 11, CTRL_AW), 18, "address width of the prototype map");
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      s = $urandom_range(0, 3);
      w = $urandom_range(0, 63);
      addr = BASE | (32'(s) << OFS_W) | (32'(w) << 2);
      if ($urandom_range(0, 1)) begin
        d = $urandom;
        strb = (n % 3 == 0) ? 4'hF : 4'($urandom);
        t0 = cyc;
        bfm.write(addr, d, strb, resp);
        t1 = cyc;
        chk(resp, RESP_OKAY, "write response");
        for (int i = 0; i < 4; i++) if (strb[i]) model[s][w][8*i +: 8] = d[8*i +: 8];
      end else begin
        t0 = cyc;
        bfm.read(addr, d, resp);
        t1 = cyc;
        chk(resp, RESP_OKAY, "read response");
        chk(d, model[s][w], $sformatf("read section %0d word %0d", s, w));
      end
    end
    // every location of every section holds what the model says
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 64; j++) chk(smem[i][j], model[i][j], $sformatf("section %0d word %0d", i, j));
    // Table-2 style addresses land in the right section
    bfm.write(BASE + 32'h0_8000, 32'hA1, 4'hF, resp);
    bfm.write(BASE + 32'h1_0004, 32'hB2, 4'hF, resp);
    bfm.write(BASE + 32'h1_8008, 32'hC3, 4'hF, resp);
    bfm.write(BASE + 32'h0_000C, 32'hD4, 4'hF, resp);
    chk(smem[SEC_IMEM][0], 32'hA1, "IMEM at 0x08000");
    chk(smem[SEC_DMEM][1], 32'hB2, "DMEM at 0x10004");
    chk(smem[SEC_PMEM][2], 32'hC3, "PMEM at 0x18008");
    chk(smem[SEC_CTRL][3], 32'hD4, "CTRL at 0x0000C");
    // transaction latency seen by the master (including its own cycles)
    t0 = cyc; bfm.read(BASE + 32'h1_0004, d, resp); t1 = cyc;
    // R handshake on the 4th rising edge after AR is presented, +1 for the
    // master starting at a falling edge; B handshake on the 3rd, +1 likewise
    chk(32'(t1 - t0), 5, "read transaction cycles");
    t0 = cyc; bfm.write(BASE + 32'h1_0004, 1, 4'hF, resp); t1 = cyc;
    chk(32'(t1 - t0), 4, "write transaction cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
