// almaif_tta_accel: an AlmaIF accelerator of one or more TTA cores behind a
// single AXI slave.
//
// The host sees four sections through one AXI4-Lite slave (see
// almaif_axi_slave): CTRL, IMEM, DMEM and PMEM. The instruction, data and
// parameter memories are shared: one port for the host and one for each
// core (almaif_mpram). Each core (tta_core) has its own control interface
// (almaif_ctrl) and its own private scratchpad, reached only through its
// load/store unit. Host accesses and core accesses use separate RAM ports,
// so the host can read results or fill the next command queue while the
// cores run.
//
// CTRL holds one 2**CTRL_AW-byte window per core: core i answers at CTRL
// offset i * 2**CTRL_AW. The cores run independently; each is started,
// stopped and debugged through its own window, typically from its own
// START_ADDR, and reports its own status and counters. The outputs running
// and halted summarise all cores: running is high while any core runs,
// halted while all have halted.
//
// Default sizes are those of the prototype TTA: one core, 64 KB IMEM (8192
// 64-bit instructions), 32 KB DMEM, 2 KB PMEM and a 4 KB scratchpad; the
// accelerator's address is then 2 + 16 = 18 bits wide. The host writes IMEM
// 32 bits at a time: offset bit 2 selects the upper or lower half of an
// instruction (little-endian). All sizes and N_CORES must be powers of two.
//
// Timing: AXI write about 3 cycles, read about 4 cycles (one transaction at
// a time). Core timing as in tta_core; the cores run on the same clock as
// the AXI slave here, a single-clock simplification.
//
// Single- and multicore organisations, the separate control interface per
// core and the shared memories follow the AlmaIF accelerator organisation;
// the CTRL window layout, a memory port per core and the summary outputs are
// this design's own.
module almaif_tta_accel
  import almaif_pkg::*;
  import tta_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 65536,
  parameter int unsigned DMEM_BYTES = 32768,
  parameter int unsigned PMEM_BYTES = 2048,
  parameter int unsigned SPM_BYTES  = 4096,
  parameter int unsigned NUM_BP     = 2,
  parameter int unsigned N_CORES    = 1,
  parameter logic [31:0] DEVICE_ID  = 32'h0000_0001,
  localparam int unsigned IMEM_AW   = $clog2(IMEM_BYTES),
  localparam int unsigned DMEM_AW   = $clog2(DMEM_BYTES),
  localparam int unsigned PMEM_AW   = $clog2(PMEM_BYTES),
  localparam int unsigned SPM_AW    = $clog2(SPM_BYTES),
  localparam int unsigned CSEL_W    = (N_CORES > 1) ? $clog2(N_CORES) : 0,
  localparam int unsigned ADDR_W    = almaif_addr_width(IMEM_AW, DMEM_AW, PMEM_AW, CTRL_AW + CSEL_W),
  localparam int unsigned OFS_W     = ADDR_W - 2,
  localparam int unsigned PC_W      = IMEM_AW - 3,
  // core data offset: wide enough for DMEM, PMEM and scratchpad
  localparam int unsigned DOFS_W    = (DMEM_AW > PMEM_AW) ?
                                      ((DMEM_AW > SPM_AW) ? DMEM_AW : SPM_AW) :
                                      ((PMEM_AW > SPM_AW) ? PMEM_AW : SPM_AW)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  axi_lite_req_t  s_axi_req,
  output axi_lite_resp_t s_axi_resp,
  output logic           running,    // some core is enabled (executing) this cycle
  output logic           halted      // every core stopped on a HALT move (kernel done)
);

  // ---------------- host side ----------------
  logic [3:0]       sec_req;
  logic             sec_we;
  logic [OFS_W-1:0] sec_ofs;
  logic [3:0]       sec_be;
  logic [31:0]      sec_wdata;
  logic [3:0][31:0] sec_rdata;

  almaif_axi_slave #(.OFS_W(OFS_W)) u_slave (
    .clk, .rst_n,
    .axi_req(s_axi_req), .axi_resp(s_axi_resp),
    .sec_req, .sec_we, .sec_ofs, .sec_be, .sec_wdata, .sec_rdata
  );

  localparam int unsigned NP = N_CORES + 1;  // memory ports: host + cores

  // core-side signals, one entry per core
  logic [N_CORES-1:0]                core_rst_n, en, ir_valid, retire, halt, c_running, c_halted;
  logic [N_CORES-1:0][PC_W-1:0]      start_addr, pc;
  logic [N_CORES-1:0]                imem_en;
  logic [N_CORES-1:0][PC_W-1:0]      imem_addr;
  logic [N_CORES-1:0][2:0]           mem_req;
  logic [N_CORES-1:0]                mem_we;
  logic [N_CORES-1:0][DOFS_W-1:0]    mem_addr;
  logic [N_CORES-1:0][31:0]          mem_wdata;
  logic [N_CORES-1:0][3:0]           mem_be;
  logic [N_CORES-1:0][2:0][31:0]     mem_rdata;
  logic [N_CORES-1:0][31:0]          ctrl_rdata, dbg_data;
  logic [N_CORES-1:0][5:0]           dbg_sel;

  // memory port bundles: index 0 host, 1 + i core i
  logic [NP-1:0]                     im_en, dm_en, pm_en, dm_we, pm_we;
  logic [NP-1:0][IMEM_AW-4:0]        im_addr;
  logic [NP-1:0][DMEM_AW-3:0]        dm_addr;
  logic [NP-1:0][PMEM_AW-3:0]        pm_addr;
  logic [NP-1:0][7:0]                im_be;
  logic [NP-1:0][3:0]                dm_be, pm_be;
  logic [NP-1:0][INSTR_W-1:0]        im_wdata, im_rdata;
  logic [NP-1:0][31:0]               dm_wdata, dm_rdata, pm_wdata, pm_rdata;

  // ---------------- control interfaces, one window per core ----------------
  logic [CSEL_W > 0 ? CSEL_W - 1 : 0 : 0] csel, csel_q;
  if (CSEL_W > 0) begin : g_csel
    assign csel = sec_ofs[CTRL_AW +: CSEL_W];
  end else begin : g_csel1
    assign csel = '0;
  end
  always_ff @(posedge clk) if (sec_req[SEC_CTRL]) csel_q <= csel;
  assign sec_rdata[SEC_CTRL] = ctrl_rdata[csel_q];

  // ---------------- instruction memory (shared) ----------------
  logic imem_half_q;
  assign im_en[0]    = sec_req[SEC_IMEM];
  assign im_addr[0]  = sec_ofs[IMEM_AW-1:3];
  assign im_be[0]    = sec_we ? (sec_ofs[2] ? {sec_be, 4'b0000} : {4'b0000, sec_be}) : 8'h00;
  assign im_wdata[0] = {sec_wdata, sec_wdata};
  always_ff @(posedge clk) if (sec_req[SEC_IMEM]) imem_half_q <= sec_ofs[2];
  assign sec_rdata[SEC_IMEM] = imem_half_q ? im_rdata[0][63:32] : im_rdata[0][31:0];

  almaif_mpram #(.NP(NP), .WIDTH(INSTR_W), .DEPTH(IMEM_BYTES / 8)) u_imem (
    .clk, .en(im_en), .we({{N_CORES{1'b0}}, sec_we}), .addr(im_addr), .be(im_be),
    .wdata(im_wdata), .rdata(im_rdata)
  );

  // ---------------- data and parameter memories (shared) ----------------
  assign dm_en[0] = sec_req[SEC_DMEM];
  assign dm_we[0] = sec_we;
  assign dm_addr[0] = sec_ofs[DMEM_AW-1:2];
  assign dm_be[0] = sec_be;
  assign dm_wdata[0] = sec_wdata;
  assign sec_rdata[SEC_DMEM] = dm_rdata[0];
  assign pm_en[0] = sec_req[SEC_PMEM];
  assign pm_we[0] = sec_we;
  assign pm_addr[0] = sec_ofs[PMEM_AW-1:2];
  assign pm_be[0] = sec_be;
  assign pm_wdata[0] = sec_wdata;
  assign sec_rdata[SEC_PMEM] = pm_rdata[0];

  almaif_mpram #(.NP(NP), .WIDTH(32), .DEPTH(DMEM_BYTES / 4)) u_dmem (
    .clk, .en(dm_en), .we(dm_we), .addr(dm_addr), .be(dm_be), .wdata(dm_wdata), .rdata(dm_rdata)
  );
  almaif_mpram #(.NP(NP), .WIDTH(32), .DEPTH(PMEM_BYTES / 4)) u_pmem (
    .clk, .en(pm_en), .we(pm_we), .addr(pm_addr), .be(pm_be), .wdata(pm_wdata), .rdata(pm_rdata)
  );

  // ---------------- cores ----------------
  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    almaif_ctrl #(
      .PC_W(PC_W), .NUM_BP(NUM_BP), .DEV_CLASS(DEV_CLASS_TTA), .DEVICE_ID(DEVICE_ID),
      .CORE_COUNT(N_CORES), .IMEM_BYTES(IMEM_BYTES), .DMEM_BYTES(DMEM_BYTES),
      .PMEM_BYTES(PMEM_BYTES)
    ) u_ctrl (
      .clk, .rst_n,
      .req(sec_req[SEC_CTRL] && csel == c), .we(sec_we), .addr(sec_ofs[CTRL_AW-1:0]),
      .be(sec_be), .wdata(sec_wdata), .rdata(ctrl_rdata[c]),
      .core_rst_n(core_rst_n[c]), .en(en[c]), .start_addr(start_addr[c]), .pc(pc[c]),
      .ir_valid(ir_valid[c]), .retire(retire[c]), .halt(halt[c]),
      .dbg_sel(dbg_sel[c]), .dbg_data(dbg_data[c]),
      .running(c_running[c]), .halted(c_halted[c])
    );

    tta_core #(.PC_W(PC_W), .OFS_W(DOFS_W)) u_core (
      .clk, .core_rst_n(core_rst_n[c]), .en(en[c]), .start_addr(start_addr[c]),
      .imem_en(imem_en[c]), .imem_addr(imem_addr[c]), .imem_rdata(im_rdata[c+1]),
      .mem_req(mem_req[c]), .mem_we(mem_we[c]), .mem_addr(mem_addr[c]),
      .mem_wdata(mem_wdata[c]), .mem_be(mem_be[c]), .mem_rdata(mem_rdata[c]),
      .pc(pc[c]), .ir_valid(ir_valid[c]), .retire(retire[c]), .halt(halt[c]),
      .dbg_sel(dbg_sel[c]), .dbg_data(dbg_data[c])
    );

    // core ports of the shared memories
    assign im_en[c+1]    = imem_en[c];
    assign im_addr[c+1]  = imem_addr[c];
    assign im_be[c+1]    = '0;
    assign im_wdata[c+1] = '0;
    assign dm_en[c+1]    = mem_req[c][1];
    assign dm_we[c+1]    = mem_we[c];
    assign dm_addr[c+1]  = mem_addr[c][DMEM_AW-1:2];
    assign dm_be[c+1]    = mem_be[c];
    assign dm_wdata[c+1] = mem_wdata[c];
    assign mem_rdata[c][1] = dm_rdata[c+1];
    assign pm_en[c+1]    = mem_req[c][2];
    assign pm_we[c+1]    = mem_we[c];
    assign pm_addr[c+1]  = mem_addr[c][PMEM_AW-1:2];
    assign pm_be[c+1]    = mem_be[c];
    assign pm_wdata[c+1] = mem_wdata[c];
    assign mem_rdata[c][2] = pm_rdata[c+1];

    // private scratchpad: its host port is idle
    logic [31:0] spm_host_rdata;
    almaif_dpram #(.WIDTH(32), .DEPTH(SPM_BYTES / 4)) u_spm (
      .clk,
      .a_en(1'b0), .a_we(1'b0), .a_addr('0), .a_be('0), .a_wdata('0), .a_rdata(spm_host_rdata),
      .b_en(mem_req[c][0]), .b_we(mem_we[c]), .b_addr(mem_addr[c][SPM_AW-1:2]), .b_be(mem_be[c]),
      .b_wdata(mem_wdata[c]), .b_rdata(mem_rdata[c][0])
    );
  end

  assign running = |c_running;
  assign halted  = &c_halted;

endmodule
