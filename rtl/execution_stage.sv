// execution_stage: the SIMD functional units and the vector register file.
//
// NR_FUS SIMD units (unit 0: ALU, unit 1: multiplier) each take micro-ops
// from the dispatcher through their own queue, share the VRF through its
// lock, RO-bus and WB-bus ports, and report finished instructions to the
// vector write back arbiter. `retire` tells the dispatcher which micro-ops
// have left a unit. The regular structure (queue + RO/EX/WB per unit around
// one VRF) follows the source; the number and kinds of units are this
// design's choice.
module execution_stage
  import vu_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            uop_valid_i [NR_FUS],
  output logic            uop_ready_o [NR_FUS],
  input  uop_t            uop_i       [NR_FUS],
  output logic            vwb_req_o   [NR_FUS],
  output wb_req_t         vwb_data_o  [NR_FUS],
  input  logic            vwb_gnt_i   [NR_FUS],
  output logic            retire_o    [NR_FUS],
  output uop_t            retire_uop_o[NR_FUS]
);

  logic       lock_req [NR_FUS];
  vreg_mask_t lock_rd  [NR_FUS];
  vreg_mask_t lock_wr  [NR_FUS];
  logic       lock_gnt [NR_FUS];
  vreg_mask_t rel_rd   [NR_FUS];
  logic       rd_req   [NR_FUS][2];
  vreg_idx_t  rd_addr  [NR_FUS][2];
  logic       rd_gnt   [NR_FUS][2];
  logic       rd_valid [NR_FUS][2];
  vreg_data_t rd_data  [NR_FUS][2];
  logic       wr_req   [NR_FUS];
  vreg_idx_t  wr_addr  [NR_FUS];
  vreg_data_t wr_data  [NR_FUS];
  vreg_be_t   wr_be    [NR_FUS];
  logic       wr_ack   [NR_FUS];

  for (genvar f = 0; f < NR_FUS; f++) begin : g_fu
    simd_fu #(.FU(f == 0 ? FU_ALU : FU_MUL)) i_fu (
      .clk_i, .rst_ni,
      .uop_valid_i  (uop_valid_i[f]),
      .uop_ready_o  (uop_ready_o[f]),
      .uop_i        (uop_i[f]),
      .lock_req_o   (lock_req[f]),
      .lock_rd_o    (lock_rd[f]),
      .lock_wr_o    (lock_wr[f]),
      .lock_gnt_i   (lock_gnt[f]),
      .rel_rd_o     (rel_rd[f]),
      .rd_req_o     (rd_req[f]),
      .rd_addr_o    (rd_addr[f]),
      .rd_gnt_i     (rd_gnt[f]),
      .rd_valid_i   (rd_valid[f]),
      .rd_data_i    (rd_data[f]),
      .wr_req_o     (wr_req[f]),
      .wr_addr_o    (wr_addr[f]),
      .wr_data_o    (wr_data[f]),
      .wr_be_o      (wr_be[f]),
      .wr_ack_i     (wr_ack[f]),
      .vwb_req_o    (vwb_req_o[f]),
      .vwb_data_o   (vwb_data_o[f]),
      .vwb_gnt_i    (vwb_gnt_i[f]),
      .retire_o     (retire_o[f]),
      .retire_uop_o (retire_uop_o[f])
    );
  end

  vrf #(.NR_PORTS(NR_FUS)) i_vrf (
    .clk_i, .rst_ni,
    .lock_req_i (lock_req),
    .lock_rd_i  (lock_rd),
    .lock_wr_i  (lock_wr),
    .lock_gnt_o (lock_gnt),
    .rel_rd_i   (rel_rd),
    .rd_req_i   (rd_req),
    .rd_addr_i  (rd_addr),
    .rd_gnt_o   (rd_gnt),
    .rd_valid_o (rd_valid),
    .rd_data_o  (rd_data),
    .wr_req_i   (wr_req),
    .wr_addr_i  (wr_addr),
    .wr_data_i  (wr_data),
    .wr_be_i    (wr_be),
    .wr_ack_o   (wr_ack)
  );

endmodule
