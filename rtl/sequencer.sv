// sequencer: first logical stage of the vector unit.
//
// The raw instruction, the two scalar operands and the trans_id arrive from
// the core's issue stage together with issue_valid. The vector decoder
// decodes it against the current vtype/vl, and the instruction goes to
// exactly one of three modules: the exception module (illegal
// instructions), the vector configuration module (vsetvli/vsetvl) or the
// vector dispatcher (everything else). `ready` toward the core is high only
// when all three can accept, so a configuration instruction waiting for its
// commit, a pending exception or a dispatch in progress all stall issue.
// The four parts and their roles follow the source; the routing rule and
// the way `ready` combines them are this design's.
//
// CFG_STALL_UNTIL_COMMIT (default 1) makes a vsetvl/vsetvli stall the unit
// until it commits; 0 ends the stall at its write back (see vector_config).
module sequencer
  import vu_pkg::*;
#(
  parameter bit CFG_STALL_UNTIL_COMMIT = 1'b1
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  // from read operands / issue
  input  logic            issue_valid_i,
  output logic            ready_o,
  input  logic [31:0]     instr_i,
  input  logic [XLEN-1:0] scalar_a_i,
  input  logic [XLEN-1:0] scalar_b_i,
  input  trans_id_t       trans_id_i,
  // vector CSRs
  input  vtype_t          vtype_i,
  input  vl_t             vl_i,
  // from commit
  input  trans_id_t       commit_trans_id_i,
  input  logic            commit_ack_i,
  // to the execution stage
  output logic            uop_valid_o [NR_FUS],
  input  logic            uop_ready_i [NR_FUS],
  output uop_t            uop_o       [NR_FUS],
  input  logic            retire_i    [NR_FUS],
  input  uop_t            retire_uop_i[NR_FUS],
  // to the vector write back (0: configuration, 1: exception)
  output logic            vwb_req_o   [2],
  output wb_req_t         vwb_data_o  [2],
  input  logic            vwb_gnt_i   [2],
  // status
  output logic            cfg_stall_o,
  output logic            hazard_o
);

  decoded_t dec;
  logic     cfg_ready, exc_ready, disp_ready, fire;

  vector_decoder i_decoder (
    .instr_i, .scalar_a_i, .scalar_b_i, .trans_id_i, .vtype_i, .vl_i,
    .dec_o (dec)
  );

  assign ready_o = cfg_ready && exc_ready && disp_ready;
  assign fire    = issue_valid_i && ready_o;

  vector_exception i_exception (
    .clk_i, .rst_ni,
    .valid_i    (fire && dec.illegal),
    .ready_o    (exc_ready),
    .dec_i      (dec),
    .vwb_req_o  (vwb_req_o[1]),
    .vwb_data_o (vwb_data_o[1]),
    .vwb_gnt_i  (vwb_gnt_i[1])
  );

  vector_config #(.STALL_UNTIL_COMMIT(CFG_STALL_UNTIL_COMMIT)) i_config (
    .clk_i, .rst_ni,
    .valid_i    (fire && !dec.illegal && dec.is_cfg),
    .ready_o    (cfg_ready),
    .dec_i      (dec),
    .vwb_req_o  (vwb_req_o[0]),
    .vwb_data_o (vwb_data_o[0]),
    .vwb_gnt_i  (vwb_gnt_i[0]),
    .commit_trans_id_i,
    .commit_ack_i,
    .stall_o    (cfg_stall_o)
  );

  vector_dispatcher i_dispatcher (
    .clk_i, .rst_ni,
    .valid_i     (fire && !dec.illegal && !dec.is_cfg),
    .ready_o     (disp_ready),
    .dec_i       (dec),
    .uop_valid_o, .uop_ready_i, .uop_o, .retire_i, .retire_uop_i,
    .hazard_o
  );

endmodule
