// almaif_axi_slave: AXI4-Lite slave front end of an AlmaIF accelerator.
//
// The accelerator's address has ADDR_W = 2 + OFS_W bits: the two high bits
// select the section (CTRL, IMEM, DMEM, PMEM; see almaif_pkg::section_e) and
// the OFS_W low bits are the byte offset inside it, wide enough for the
// largest section. Base-address bits above ADDR_W are ignored, so the slave
// works at any aligned base. Offsets beyond a section's size wrap inside it
// (AlmaIF leaves accesses between sections undefined).
//
// One transaction at a time. A write takes AW and W together, drives one
// write cycle on the section port, then answers on B. A read takes AR,
// drives one read cycle and takes the read data one cycle later (every
// section has a one-cycle read latency), then answers on R. Writes win when
// AW/W and AR arrive together. Responses are always OKAY, so the response
// fields are constant: every offset of every section is backed by memory or
// a register.
//
// Section port: sec_req is one-hot over the four sections (index =
// section code), with shared we, ofs, be and wdata; sec_rdata[i] is the
// data of section i, sampled one cycle after its request. AXI4-Lite is
// this design's choice for the PS general-purpose port; the section split
// follows AlmaIF.
module almaif_axi_slave
  import almaif_pkg::*;
#(
  parameter int unsigned OFS_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  axi_lite_req_t        axi_req,
  output axi_lite_resp_t       axi_resp,
  output logic [3:0]           sec_req,
  output logic                 sec_we,
  output logic [OFS_W-1:0]     sec_ofs,
  output logic [3:0]           sec_be,
  output logic [31:0]          sec_wdata,
  input  logic [3:0][31:0]     sec_rdata
);

  typedef enum logic [2:0] {
    IDLE   = 3'd0,
    WR     = 3'd1,
    BRESP  = 3'd2,
    RD     = 3'd3,
    RWAIT  = 3'd4,
    RRESP  = 3'd5
  } state_e;

  state_e             state;
  logic [OFS_W+1:0]   addr_q;
  logic [31:0]        wdata_q, rdata_q;
  logic [3:0]         be_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      addr_q  <= '0;
      wdata_q <= '0;
      be_q    <= '0;
      rdata_q <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          if (axi_req.aw_valid && axi_req.w_valid) begin
            addr_q  <= axi_req.aw_addr[OFS_W+1:0];
            wdata_q <= axi_req.w_data;
            be_q    <= axi_req.w_strb;
            state   <= WR;
          end else if (axi_req.ar_valid) begin
            addr_q <= axi_req.ar_addr[OFS_W+1:0];
            state  <= RD;
          end
        end
        WR:    state <= BRESP;
        BRESP: if (axi_req.b_ready) state <= IDLE;
        RD:    state <= RWAIT;
        RWAIT: begin
          rdata_q <= sec_rdata[addr_q[OFS_W+1:OFS_W]];
          state   <= RRESP;
        end
        RRESP: if (axi_req.r_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    axi_resp          = '0;
    axi_resp.aw_ready = (state == IDLE) && axi_req.aw_valid && axi_req.w_valid;
    axi_resp.w_ready  = (state == IDLE) && axi_req.aw_valid && axi_req.w_valid;
    axi_resp.ar_ready = (state == IDLE) && !(axi_req.aw_valid && axi_req.w_valid);
    axi_resp.b_valid  = (state == BRESP);
    axi_resp.b_resp   = RESP_OKAY;
    axi_resp.r_valid  = (state == RRESP);
    axi_resp.r_data   = rdata_q;
    axi_resp.r_resp   = RESP_OKAY;

    sec_req   = '0;
    if (state == WR || state == RD) sec_req[addr_q[OFS_W+1:OFS_W]] = 1'b1;
    sec_we    = (state == WR);
    sec_ofs   = addr_q[OFS_W-1:0];
    sec_be    = be_q;
    sec_wdata = wdata_q;
  end

  // AXI rule: a valid stays high, with stable payload, until its handshake.
  property p_hold(logic v, logic r);
    @(posedge clk) disable iff (!rst_n) v && !r |=> v;
  endproperty
  a_b_hold: assert property (p_hold(axi_resp.b_valid, axi_req.b_ready));
  a_r_hold: assert property (p_hold(axi_resp.r_valid, axi_req.r_ready));
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
      axi_resp.r_valid && !axi_req.r_ready |=> $stable(axi_resp.r_data));

endmodule
