// ariane_vector_ext: the vector extension of a 64-bit in-order RISC-V core.
//
// Everything the vector extension adds to the core, wired together: the
// vector pre-decoder with its mux beside the core's decoder, the vector
// CSRs with their muxes around the core's CSR file, and the pluggable
// vector unit. The scalar core itself (front-end, decoder, scoreboard,
// issue/read operands, scalar units, commit, scalar CSRs) is outside; its
// signals are this module's ports:
//   - decode: the fetched instruction and the scalar decoder's entry in,
//     the selected entry out;
//   - issue: instruction, scalar operands, trans_id and issue_valid into the
//     vector unit, vu_ready back;
//   - write back: the vector unit's results, with vector-CSR controls;
//   - commit: trans_id and commit_ack of the retiring instruction, and the
//     vector-CSR controls it carries (commit_vcsr_*), which update vl,
//     vtype and vstart here;
//   - CSR instructions, with the scalar CSR file's operation and read data.
// The vector unit reads the current vtype and vl straight from the CSRs.
//
// Lint reports rst_ni as both synchronous and asynchronous: the handshake
// assertions in the sub-blocks use it in disable iff, while all flops reset
// asynchronously. The circuit itself uses it only asynchronously.
//
// Which additions the core needs (pre-decode, new CSRs, CSR update on
// retirement, write back and stall of the unit) follows the source; the
// port grouping and signal names are this design's.
//
// CFG_STALL_UNTIL_COMMIT (default 1) makes a vsetvl/vsetvli stall the unit
// until it commits; 0 ends the stall at its write back (see vector_config).
module ariane_vector_ext
  import vu_pkg::*;
#(
  parameter int unsigned NR_WB_PORTS            = 1,
  parameter bit          CFG_STALL_UNTIL_COMMIT = 1'b1
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  // decode
  input  logic [31:0]     dec_instr_i,
  input  issue_entry_t    dec_scalar_entry_i,
  output logic            dec_is_vector_o,
  output issue_entry_t    dec_entry_o,
  // issue
  input  logic            issue_valid_i,
  output logic            vu_ready_o,
  input  logic [31:0]     issue_instr_i,
  input  logic [XLEN-1:0] issue_scalar_a_i,
  input  logic [XLEN-1:0] issue_scalar_b_i,
  input  trans_id_t       issue_trans_id_i,
  // write back
  output logic            wb_valid_o [NR_WB_PORTS],
  output wb_req_t         wb_data_o  [NR_WB_PORTS],
  // commit
  input  trans_id_t       commit_trans_id_i,
  input  logic            commit_ack_i,
  input  logic            commit_vcsr_valid_i,
  input  vcsr_ctrl_t      commit_vcsr_i,
  // CSR instructions
  input  csr_op_e         csr_op_i,
  input  logic [11:0]     csr_addr_i,
  input  logic [XLEN-1:0] csr_wdata_i,
  output logic [XLEN-1:0] csr_rdata_o,
  output logic            csr_illegal_o,
  output csr_op_e         scalar_csr_op_o,
  input  logic [XLEN-1:0] scalar_csr_rdata_i,
  output logic            is_vcsr_o,
  // vector CSR values the core's other units may use
  output vl_t             vstart_o,
  output logic [1:0]      vxrm_o,
  output logic            vxsat_o,
  // status
  output logic            vu_cfg_stall_o,
  output logic            vu_hazard_o
);

  vtype_t     vtype;
  vl_t        vl;

  vector_predecoder i_predecoder (
    .instr_i        (dec_instr_i),
    .scalar_entry_i (dec_scalar_entry_i),
    .is_vector_o    (dec_is_vector_o),
    .entry_o        (dec_entry_o)
  );

  vector_csrs i_vcsrs (
    .clk_i, .rst_ni,
    .csr_op_i, .csr_addr_i, .csr_wdata_i, .csr_rdata_o, .csr_illegal_o,
    .is_vcsr_o       (is_vcsr_o),
    .scalar_csr_op_o,
    .scalar_rdata_i  (scalar_csr_rdata_i),
    .update_i        (commit_vcsr_valid_i),
    .update_ctrl_i   (commit_vcsr_i),
    .vtype_o         (vtype),
    .vl_o            (vl),
    .vstart_o        (vstart_o),
    .vxrm_o          (vxrm_o),
    .vxsat_o         (vxsat_o)
  );

  vector_unit #(
    .NR_WB_PORTS            (NR_WB_PORTS),
    .CFG_STALL_UNTIL_COMMIT (CFG_STALL_UNTIL_COMMIT)
  ) i_vu (
    .clk_i, .rst_ni,
    .issue_valid_i,
    .ready_o           (vu_ready_o),
    .instr_i           (issue_instr_i),
    .scalar_a_i        (issue_scalar_a_i),
    .scalar_b_i        (issue_scalar_b_i),
    .trans_id_i        (issue_trans_id_i),
    .vtype_i           (vtype),
    .vl_i              (vl),
    .commit_trans_id_i,
    .commit_ack_i,
    .wb_valid_o,
    .wb_data_o,
    .cfg_stall_o       (vu_cfg_stall_o),
    .hazard_o          (vu_hazard_o)
  );

endmodule
