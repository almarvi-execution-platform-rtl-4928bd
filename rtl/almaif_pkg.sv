// almaif_pkg: types and constants shared by the AlmaIF accelerator interface.
//
// AlmaIF is a common way to attach a processor-based accelerator to a host
// as an AXI slave. The slave's address space is cut into four sections,
// selected by the two highest address bits: the control interface (CTRL),
// instruction memory (IMEM), data memory (DMEM) and parameter memory (PMEM).
// The low bits are a byte offset wide enough for the largest section.
//
// The section codes and the address-width rule follow the AlmaIF
// description. The AXI4-Lite request/response structs and the CTRL register
// offsets and bit positions are this design's own choice: AlmaIF names the
// register groups (identification, capabilities, status, commands) but this
// package fixes where each register lives.
package almaif_pkg;

  localparam int unsigned AXI_AW = 32;
  localparam int unsigned AXI_DW = 32;

  // AXI4-Lite, master-to-slave half of the channel set.
  typedef struct packed {
    logic [AXI_AW-1:0]   aw_addr;
    logic                aw_valid;
    logic [AXI_DW-1:0]   w_data;
    logic [AXI_DW/8-1:0] w_strb;
    logic                w_valid;
    logic                b_ready;
    logic [AXI_AW-1:0]   ar_addr;
    logic                ar_valid;
    logic                r_ready;
  } axi_lite_req_t;

  // AXI4-Lite, slave-to-master half.
  typedef struct packed {
    logic              aw_ready;
    logic              w_ready;
    logic [1:0]        b_resp;
    logic              b_valid;
    logic              ar_ready;
    logic [AXI_DW-1:0] r_data;
    logic [1:0]        r_resp;
    logic              r_valid;
  } axi_lite_resp_t;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  // Section select: the two address bits above the byte offset.
  typedef enum logic [1:0] {
    SEC_CTRL = 2'b00,
    SEC_IMEM = 2'b01,
    SEC_DMEM = 2'b10,
    SEC_PMEM = 2'b11
  } section_e;

  // Width of the byte address of one core's CTRL window.
  localparam int unsigned CTRL_AW = 8;

  // addrwidth_IP = 2 + max(imem, dmem, pmem, ctrl) address widths, where the
  // CTRL section holds one window of 2**CTRL_AW bytes per core.
  function automatic int unsigned almaif_addr_width(int unsigned imem_aw, int unsigned dmem_aw,
                                                    int unsigned pmem_aw, int unsigned ctrl_aw);
    int unsigned m;
    m = imem_aw;
    if (dmem_aw > m) m = dmem_aw;
    if (pmem_aw > m) m = pmem_aw;
    if (ctrl_aw > m) m = ctrl_aw;
    return 2 + m;
  endfunction

  // CTRL register byte offsets inside one core's window.
  // Identification and capabilities (read only).
  localparam logic [7:0] REG_DEV_CLASS   = 8'h00;
  localparam logic [7:0] REG_DEVICE_ID   = 8'h04;
  localparam logic [7:0] REG_VERSION     = 8'h08;
  localparam logic [7:0] REG_CORE_COUNT  = 8'h0C;
  localparam logic [7:0] REG_IMEM_SIZE   = 8'h10;
  localparam logic [7:0] REG_DMEM_SIZE   = 8'h14;
  localparam logic [7:0] REG_PMEM_SIZE   = 8'h18;
  localparam logic [7:0] REG_DEBUG_FEAT  = 8'h1C;
  // Status (read only).
  localparam logic [7:0] REG_STATUS      = 8'h40;
  localparam logic [7:0] REG_PC          = 8'h44;
  localparam logic [7:0] REG_CYCLE_CNT   = 8'h48;
  localparam logic [7:0] REG_INSTR_CNT   = 8'h4C;
  localparam logic [7:0] REG_BREAK_CNT   = 8'h50;
  localparam logic [7:0] REG_DBG_DATA    = 8'h54;  // core state selected by REG_DBG_SEL
  // Commands and debug settings.
  localparam logic [7:0] REG_CMD         = 8'h80;
  localparam logic [7:0] REG_START_ADDR  = 8'h84;
  localparam logic [7:0] REG_BP_ENABLE   = 8'h88;
  localparam logic [7:0] REG_DBG_SEL     = 8'h8C;  // 0..31 RF, 32 RA, 33 guards
  localparam logic [7:0] REG_BP_ADDR0    = 8'hC0;  // + 4*i

  // REG_CMD bits (write one to act).
  localparam int unsigned CMD_RESET    = 0;
  localparam int unsigned CMD_CONTINUE = 1;
  localparam int unsigned CMD_BREAK    = 2;
  localparam int unsigned CMD_STEP     = 3;

  // REG_STATUS bits.
  localparam int unsigned ST_RUNNING = 0;
  localparam int unsigned ST_BREAK   = 1;
  localparam int unsigned ST_RESET   = 2;
  localparam int unsigned ST_HALTED  = 3;
  localparam int unsigned ST_BP_HIT  = 4;

  // Device classes reported in REG_DEV_CLASS.
  localparam logic [31:0] DEV_CLASS_TTA  = 32'h0000_0001;
  localparam logic [31:0] DEV_CLASS_RVEX = 32'h0000_0002;

  localparam logic [31:0] ALMAIF_VERSION = 32'h0000_0001;

endpackage
