// tta_lsu: load/store function unit of the TTA core, latency 3.
//
// Trigger port T takes the byte address and the opcode (LDW, LDH, LDHU, LDQ,
// LDQU, STW, STH, STQ); operand port O takes the store data. Loads place the
// (sign- or zero-extended) value on R three enabled cycles after the
// trigger. The core's data address space is split by the two bits above the
// OFS_W-bit byte offset: 00 = private scratchpad, 10 = data memory (DMEM),
// 11 = parameter memory (PMEM); 01 is unmapped (loads give 0, stores are
// dropped). Words are little-endian. Unaligned accesses are aligned down,
// so the two low bits of mem_addr are always zero (the memories are
// addressed by word; the byte lanes travel in mem_be).
//
// Stage 1 registers the request, stage 2 drives one of the three memory
// ports (synchronous RAMs, read data one cycle later), stage 3 extracts the
// byte lanes and registers R. The unit freezes while en is low. That the LSU
// reaches DMEM, PMEM and an optional scratchpad follows the accelerator
// organisation; the address split, latency and opcode set are this design's.
module tta_lsu
  import tta_pkg::*;
#(
  parameter int unsigned OFS_W = 15
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              o_we,
  input  logic [31:0]       o_data,
  input  logic              t_we,
  input  logic [31:0]       t_data,
  input  logic [4:0]        t_op,
  output logic [31:0]       r_data,
  // memory ports: 0 = scratchpad, 1 = DMEM, 2 = PMEM
  output logic [2:0]        mem_req,
  output logic              mem_we,
  output logic [OFS_W-1:0]  mem_addr,
  output logic [31:0]       mem_wdata,
  output logic [3:0]        mem_be,
  input  logic [2:0][31:0]  mem_rdata
);

  logic [31:0] o_reg;
  logic [31:0] s1_addr, s1_data;
  lsu_op_e     s1_op;
  logic        s1_valid;
  lsu_op_e     s2_op;
  logic [1:0]  s2_lane;
  logic [1:0]  s2_tgt;     // 0 spm, 1 dmem, 2 pmem, 3 none
  logic        s2_load;
  logic       is_store;
  logic [1:0] tgt;
  logic [1:0] lane;
  logic [31:0] word, load_val;
  logic [7:0]  qb;
  logic [15:0] hw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_reg    <= '0;
      s1_addr  <= '0;
      s1_data  <= '0;
      s1_op    <= LSU_LDW;
      s1_valid <= 1'b0;
      s2_op    <= LSU_LDW;
      s2_lane  <= '0;
      s2_tgt   <= 2'd3;
      s2_load  <= 1'b0;
      r_data   <= '0;
    end else if (en) begin
      if (o_we) o_reg <= o_data;
      s1_valid <= t_we;
      if (t_we) begin
        s1_addr <= t_data;
        s1_data <= o_we ? o_data : o_reg;
        s1_op   <= lsu_op_e'(t_op);
      end
      s2_load <= s1_valid && !is_store;
      if (s1_valid) begin
        s2_op   <= s1_op;
        s2_lane <= s1_addr[1:0];
        s2_tgt  <= tgt;
      end
      if (s2_load) r_data <= load_val;
    end
  end

  // Stage 2: address decode and memory request.
  assign is_store = (s1_op == LSU_STW) || (s1_op == LSU_STH) || (s1_op == LSU_STQ);
  assign lane     = s1_addr[1:0];

  always_comb begin
    unique case (s1_addr[OFS_W+1:OFS_W])
      2'b00:   tgt = 2'd0;
      2'b10:   tgt = 2'd1;
      2'b11:   tgt = 2'd2;
      default: tgt = 2'd3;
    endcase
    mem_req = '0;
    if (en && s1_valid && tgt != 2'd3) mem_req[tgt] = 1'b1;
    mem_we   = is_store;
    mem_addr = {s1_addr[OFS_W-1:2], 2'b00};
    unique case (s1_op)
      LSU_STQ: begin
        mem_wdata = {4{s1_data[7:0]}};
        mem_be    = 4'b0001 << lane;
      end
      LSU_STH: begin
        mem_wdata = {2{s1_data[15:0]}};
        mem_be    = lane[1] ? 4'b1100 : 4'b0011;
      end
      default: begin
        mem_wdata = s1_data;
        mem_be    = is_store ? 4'b1111 : 4'b0000;
      end
    endcase
  end

  // Stage 3: lane extraction.
  always_comb begin
    word = (s2_tgt == 2'd3) ? 32'd0 : mem_rdata[s2_tgt];
    qb   = word[8*s2_lane +: 8];
    hw   = s2_lane[1] ? word[31:16] : word[15:0];
    unique case (s2_op)
      LSU_LDH:  load_val = {{16{hw[15]}}, hw};
      LSU_LDHU: load_val = {16'd0, hw};
      LSU_LDQ:  load_val = {{24{qb[7]}}, qb};
      LSU_LDQU: load_val = {24'd0, qb};
      default:  load_val = word;
    endcase
  end

endmodule
