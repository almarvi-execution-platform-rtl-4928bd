// axi_lite_xbar: AXI4-Lite interconnect from one master to N_SLV slaves.
//
// Every accelerator of the platform sits on this interconnect as an AXI
// slave, and the host processor reaches all of them through it. Slave i
// owns the address window [BASE[i], BASE[i] + 2**WIN_W). A transaction whose
// address falls in no window is answered by the interconnect itself with
// DECERR (read data 0).
//
// One transaction at a time. A write is routed when AW and W are both valid
// (writes win over a simultaneous read); the master's AW and W are passed to
// the chosen slave and accepted when the slave accepts them, then the
// slave's B is passed back. Reads likewise with AR and R. The routing adds no
// register stage: address and data are passed combinationally, and one idle
// cycle separates consecutive transactions. Window bases and sizes are this
// design's choice.
module axi_lite_xbar
  import almaif_pkg::*;
#(
  parameter int unsigned N_SLV = 3,
  parameter int unsigned WIN_W = 18,
  parameter logic [N_SLV-1:0][31:0] BASE = {32'h43C8_0000, 32'h43C4_0000, 32'h43C0_0000}
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  axi_lite_req_t              m_req,
  output axi_lite_resp_t             m_resp,
  output axi_lite_req_t [N_SLV-1:0]  s_req,
  input  axi_lite_resp_t [N_SLV-1:0] s_resp
);

  localparam int unsigned SW = (N_SLV > 1) ? $clog2(N_SLV + 1) : 1;

  typedef enum logic [2:0] {
    IDLE   = 3'd0,
    W_FWD  = 3'd1,
    W_RESP = 3'd2,
    R_FWD  = 3'd3,
    R_RESP = 3'd4,
    W_ERR  = 3'd5,
    R_ERR  = 3'd6
  } state_e;

  state_e        state;
  logic [SW-1:0] sel;
  logic          aw_done, w_done;

  function automatic logic [SW-1:0] decode(logic [31:0] a, output logic hit);
    hit = 1'b0;
    decode = '0;
    for (int i = 0; i < N_SLV; i++) begin
      if ((a >> WIN_W) == (BASE[i] >> WIN_W)) begin
        hit    = 1'b1;
        decode = SW'(i);
      end
    end
  endfunction

  logic          w_hit, r_hit;
  logic [SW-1:0] w_sel, r_sel;
  always_comb begin
    w_sel = decode(m_req.aw_addr, w_hit);
    r_sel = decode(m_req.ar_addr, r_hit);
  end

  logic w_start, r_start;
  assign w_start = (state == IDLE) && m_req.aw_valid && m_req.w_valid;
  assign r_start = (state == IDLE) && !w_start && m_req.ar_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      sel     <= '0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
    end else begin
      unique case (state)
        IDLE: begin
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          if (w_start) begin
            sel   <= w_sel;
            state <= w_hit ? W_FWD : W_ERR;
          end else if (r_start) begin
            sel   <= r_sel;
            state <= r_hit ? R_FWD : R_ERR;
          end
        end
        W_FWD: begin
          if (s_resp[sel].aw_ready) aw_done <= 1'b1;
          if (s_resp[sel].w_ready)  w_done  <= 1'b1;
          if ((aw_done || s_resp[sel].aw_ready) && (w_done || s_resp[sel].w_ready)) state <= W_RESP;
        end
        W_RESP: if (s_resp[sel].b_valid && m_req.b_ready) state <= IDLE;
        R_FWD:  if (s_resp[sel].ar_ready) state <= R_RESP;
        R_RESP: if (s_resp[sel].r_valid && m_req.r_ready) state <= IDLE;
        W_ERR:  if (m_req.b_ready) state <= IDLE;
        R_ERR:  if (m_req.r_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    m_resp = '0;
    for (int i = 0; i < N_SLV; i++) begin
      s_req[i]          = m_req;
      s_req[i].aw_valid = 1'b0;
      s_req[i].w_valid  = 1'b0;
      s_req[i].b_ready  = 1'b0;
      s_req[i].ar_valid = 1'b0;
      s_req[i].r_ready  = 1'b0;
    end
    unique case (state)
      W_FWD: begin
        s_req[sel].aw_valid = !aw_done;
        s_req[sel].w_valid  = !w_done;
        m_resp.aw_ready     = !aw_done && s_resp[sel].aw_ready;
        m_resp.w_ready      = !w_done && s_resp[sel].w_ready;
      end
      W_RESP: begin
        s_req[sel].b_ready = m_req.b_ready;
        m_resp.b_valid     = s_resp[sel].b_valid;
        m_resp.b_resp      = s_resp[sel].b_resp;
      end
      R_FWD: begin
        s_req[sel].ar_valid = 1'b1;
        m_resp.ar_ready     = s_resp[sel].ar_ready;
      end
      R_RESP: begin
        s_req[sel].r_ready = m_req.r_ready;
        m_resp.r_valid     = s_resp[sel].r_valid;
        m_resp.r_data      = s_resp[sel].r_data;
        m_resp.r_resp      = s_resp[sel].r_resp;
      end
      W_ERR: begin
        m_resp.b_valid = 1'b1;
        m_resp.b_resp  = RESP_DECERR;
      end
      R_ERR: begin
        m_resp.r_valid = 1'b1;
        m_resp.r_resp  = RESP_DECERR;
      end
      default: ;
    endcase
    // Unmapped transactions: accept AW/W or AR on entry to the error state.
    if (w_start && !w_hit) begin
      m_resp.aw_ready = 1'b1;
      m_resp.w_ready  = 1'b1;
    end
    if (r_start && !r_hit) m_resp.ar_ready = 1'b1;
  end

endmodule
