// vector_unit: the pluggable vector unit, seen by the core as one more
// functional unit.
//
// Three logical stages: the sequencer (decode, exceptions, vsetvl and
// dispatch into micro-ops), the execution stage (SIMD units around the
// banked vector register file) and the vector write back, which arbitrates
// all result sources onto the core's write-back port.
// Core-side interface, as in the source: issue (instruction bits, scalar
// operands a and b, trans_id, issue_valid) with `ready` back; commit
// (trans_id, commit_ack); the current vector CSRs; and write back (valid,
// trans_id, scalar result, exception, vector-CSR controls). The core is
// expected to apply the CSR controls when it commits the instruction.
//
// CFG_STALL_UNTIL_COMMIT (default 1) makes a vsetvl/vsetvli stall the unit
// until it commits; 0 ends the stall at its write back (see vector_config).
module vector_unit
  import vu_pkg::*;
#(
  parameter int unsigned NR_WB_PORTS            = 1,
  parameter bit          CFG_STALL_UNTIL_COMMIT = 1'b1
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  input  logic            issue_valid_i,
  output logic            ready_o,
  input  logic [31:0]     instr_i,
  input  logic [XLEN-1:0] scalar_a_i,
  input  logic [XLEN-1:0] scalar_b_i,
  input  trans_id_t       trans_id_i,
  input  vtype_t          vtype_i,
  input  vl_t             vl_i,
  input  trans_id_t       commit_trans_id_i,
  input  logic            commit_ack_i,
  output logic            wb_valid_o [NR_WB_PORTS],
  output wb_req_t         wb_data_o  [NR_WB_PORTS],
  // status: stalled behind vset{i}vl, dispatch held by a hazard
  output logic            cfg_stall_o,
  output logic            hazard_o
);

  logic    uop_valid [NR_FUS];
  logic    uop_ready [NR_FUS];
  uop_t    uop       [NR_FUS];
  logic    retire    [NR_FUS];
  uop_t    retire_uop[NR_FUS];
  logic    seq_req   [2];
  wb_req_t seq_data  [2];
  logic    seq_gnt   [2];
  logic    fu_req    [NR_FUS];
  wb_req_t fu_data   [NR_FUS];
  logic    fu_gnt    [NR_FUS];

  sequencer #(.CFG_STALL_UNTIL_COMMIT(CFG_STALL_UNTIL_COMMIT)) i_sequencer (
    .clk_i, .rst_ni,
    .issue_valid_i, .ready_o, .instr_i, .scalar_a_i, .scalar_b_i, .trans_id_i,
    .vtype_i, .vl_i, .commit_trans_id_i, .commit_ack_i,
    .uop_valid_o  (uop_valid),
    .uop_ready_i  (uop_ready),
    .uop_o        (uop),
    .retire_i     (retire),
    .retire_uop_i (retire_uop),
    .vwb_req_o    (seq_req),
    .vwb_data_o   (seq_data),
    .vwb_gnt_i    (seq_gnt),
    .cfg_stall_o,
    .hazard_o
  );

  execution_stage i_exec (
    .clk_i, .rst_ni,
    .uop_valid_i  (uop_valid),
    .uop_ready_o  (uop_ready),
    .uop_i        (uop),
    .vwb_req_o    (fu_req),
    .vwb_data_o   (fu_data),
    .vwb_gnt_i    (fu_gnt),
    .retire_o     (retire),
    .retire_uop_o (retire_uop)
  );

  localparam int unsigned NR_REQ = 2 + NR_FUS;
  logic    req  [NR_REQ];
  wb_req_t data [NR_REQ];
  logic    gnt  [NR_REQ];

  for (genvar r = 0; r < NR_REQ; r++) begin : g_req
    if (r < 2) begin : g_seq
      assign req[r]     = seq_req[r];
      assign data[r]    = seq_data[r];
      assign seq_gnt[r] = gnt[r];
    end else begin : g_fu
      assign req[r]        = fu_req[r-2];
      assign data[r]       = fu_data[r-2];
      assign fu_gnt[r-2]   = gnt[r];
    end
  end

  vector_write_back #(.NR_REQ(NR_REQ), .NR_WB_PORTS(NR_WB_PORTS)) i_vwb (
    .req_i  (req),
    .data_i (data),
    .gnt_o  (gnt),
    .wb_valid_o,
    .wb_data_o
  );

endmodule
