// vector_config: vsetvli / vsetvl, the strip-mining of the vector unit.
//
// On a configuration instruction it computes the new vtype and
//   VLMAX = LMUL * VLEN / SEW,
//   vl = min(AVL, VLMAX)   with AVL = rs1 when rs1 != x0,
//   vl = VLMAX             when rs1 = x0 and rd != x0,
//   vl = min(vl, VLMAX)    when rs1 = rd = x0 (keep the current vl),
//   vl = 0                 when the requested vtype is not supported (vill).
// It writes back the new vl as the scalar result, with controls asking the
// CSR file to update vl and vtype and clear vstart. It then keeps `ready`
// low, stalling the whole vector unit, until the core commits that
// instruction (commit_ack with its trans_id): instructions behind it must
// see the new vl and vtype. The source allows the stall to last until the
// instruction retires "or just write-back": STALL_UNTIL_COMMIT = 1 (default)
// waits for the commit; 0 releases the unit as soon as the write back is
// granted, which is safe only if the core itself holds later vector
// instructions until the vector CSRs are updated. The three-state
// controller is this design's.
//
// Lint reports most of the decoded instruction as unused: configuration
// needs only the new vtype, the scalar AVL, vl and the x0 flags.
module vector_config
  import vu_pkg::*;
#(
  parameter bit STALL_UNTIL_COMMIT = 1'b1
) (
  input  logic      clk_i,
  input  logic      rst_ni,
  input  logic      valid_i,
  output logic      ready_o,
  input  decoded_t  dec_i,
  output logic      vwb_req_o,
  output wb_req_t   vwb_data_o,
  input  logic      vwb_gnt_i,
  input  trans_id_t commit_trans_id_i,
  input  logic      commit_ack_i,
  output logic      stall_o
);

  typedef enum logic [1:0] {IDLE, WRITE_BACK, WAIT_COMMIT} state_e;

  state_e  state_q;
  wb_req_t data_q;
  logic    committed;

  vl_t     max_vl, new_vl;
  always_comb begin
    max_vl = vlmax(dec_i.new_vtype.vsew, dec_i.new_vtype.vlmul);
    if (dec_i.new_vtype.vill)
      new_vl = '0;
    else if (!dec_i.rs1_is_x0)
      new_vl = (dec_i.scalar < XLEN'(max_vl)) ? vl_t'(dec_i.scalar) : max_vl;
    else if (!dec_i.rd_is_x0)
      new_vl = max_vl;
    else
      new_vl = (dec_i.vl < max_vl) ? dec_i.vl : max_vl;
  end

  assign ready_o    = state_q == IDLE;
  assign stall_o    = state_q != IDLE;
  assign vwb_req_o  = state_q == WRITE_BACK;
  assign vwb_data_o = data_q;
  assign committed  = commit_ack_i && commit_trans_id_i == data_q.trans_id;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= IDLE;
      data_q  <= '0;
    end else begin
      unique case (state_q)
        IDLE: if (valid_i) begin
          state_q                 <= WRITE_BACK;
          data_q                  <= '0;
          data_q.trans_id         <= dec_i.trans_id;
          data_q.result           <= XLEN'(new_vl);
          data_q.csr.vl_we        <= 1'b1;
          data_q.csr.vl           <= new_vl;
          data_q.csr.vtype_we     <= 1'b1;
          data_q.csr.vtype        <= dec_i.new_vtype;
          data_q.csr.vstart_clr   <= 1'b1;
        end
        WRITE_BACK:  if (vwb_gnt_i) state_q <= STALL_UNTIL_COMMIT ? WAIT_COMMIT : IDLE;
        WAIT_COMMIT: if (committed) state_q <= IDLE;
        default:     state_q <= IDLE;
      endcase
    end
  end

endmodule
