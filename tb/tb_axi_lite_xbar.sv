// tb_axi_lite_xbar: self-checking test of the AXI4-Lite interconnect.
// Three behavioural memory slaves with random handshake delays sit at
// 0x43C0_0000, 0x43C4_0000 and 0x43C8_0000 (256 KB windows). Random reads
// and writes must reach the right slave (each read returns the slave's ID
// in its top byte) and only that slave; addresses outside every window get
// DECERR on both channels.
`timescale 1ns / 1ps
module tb_axi_lite_xbar;
  import almaif_pkg::*;
  localparam int N = 3;
  localparam logic [N-1:0][31:0] BASE = {32'h43C8_0000, 32'h43C4_0000, 32'h43C0_0000};

  logic clk = 0, rst_n = 0;
  axi_lite_req_t m_req;
  axi_lite_resp_t m_resp;
  axi_lite_req_t [N-1:0] s_req;
  axi_lite_resp_t [N-1:0] s_resp;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axi_lite_xbar #(.N_SLV(N), .WIN_W(18), .BASE(BASE)) dut (.*);
  tb_axi_master bfm (.clk, .req(m_req), .resp(m_resp));
  tb_axi_slave_mem #(.ID(8'h10)) s0 (.clk, .rst_n, .req(s_req[0]), .resp(s_resp[0]));
  tb_axi_slave_mem #(.ID(8'h11)) s1 (.clk, .rst_n, .req(s_req[1]), .resp(s_resp[1]));
  tb_axi_slave_mem #(.ID(8'h12)) s2 (.clk, .rst_n, .req(s_req[2]), .resp(s_resp[2]));

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

  logic [23:0] model [N][64];
  logic [31:0] d, addr;
  logic [1:0] resp;
  int s, w, decerr = 0;
  int acc [N];

  initial begin
    foreach (model[i, j]) model[i][j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      s = $urandom_range(0, N);      // N = unmapped
      w = $urandom_range(0, 63);
      if (s < N) addr = BASE[s] + (32'($urandom_range(0, 1023)) << 8) + 32'(w << 2);
      else       addr = 32'h43CC_0000 + 32'(w << 2);
      if ($urandom_range(0, 1)) begin
        d = $urandom;
        bfm.write(addr, d, 4'hF, resp);
        if (s < N) begin
          chk(resp, RESP_OKAY, "write OKAY");
          model[s][w] = d[23:0];
        end else begin
          chk(resp, RESP_DECERR, "write DECERR");
          decerr++;
        end
      end else begin
        bfm.read(addr, d, resp);
        if (s < N) begin
          chk(resp, RESP_OKAY, "read OKAY");
          chk(d, {8'h10 + 8'(s), model[s][w]}, $sformatf("read slave %0d word %0d", s, w));
        end else begin
          chk(resp, RESP_DECERR, "read DECERR");
          chk(d, 0, "read data on DECERR");
          decerr++;
        end
      end
    end
    acc[0] = s0.accesses; acc[1] = s1.accesses; acc[2] = s2.accesses;
    chk(32'(acc[0] + acc[1] + acc[2] + decerr), 600, "every transaction reached exactly one target");
    chk(32'(decerr > 0), 1, "unmapped accesses happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
