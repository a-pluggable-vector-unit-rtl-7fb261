// simd_read_operands: SIMD Read Operands (RO) stage of one functional unit.
//
// Takes a locked micro-op from the queue head, reads its vector operands
// (vs1 on read channel 0, vs2 on channel 1) from the VRF and hands the
// micro-op with its operands to the execute stage (valid/ready). While it
// reads, it requests the locks of the next micro-op (the queue head), so
// that micro-ops chain through the unit back to back.
// Read locks are released once the reads are complete and either the next
// micro-op's locks are granted or there is no next micro-op; registers the
// next micro-op also reads stay locked. A new micro-op is accepted only
// after the previous one's read locks are released. Write locks are not
// touched here: they drop when the write-back stage's write is acked.
// The protocol follows the source; the two read channels and the
// per-cycle timing are this design's choices.
module simd_read_operands
  import vu_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  // queue head
  input  logic       head_valid_i,
  input  uop_t       head_uop_i,
  input  logic       head_locked_i,
  output logic       pop_o,
  // lock of the next micro-op and release of read locks
  output logic       busy_o,
  output logic       lock_req_o,
  output vreg_mask_t rel_rd_o,
  // VRF read channels (0: vs1, 1: vs2)
  output logic       rd_req_o   [2],
  output vreg_idx_t  rd_addr_o  [2],
  input  logic       rd_gnt_i   [2],
  input  logic       rd_valid_i [2],
  input  vreg_data_t rd_data_i  [2],
  // toward the execute stage
  output logic       ex_valid_o,
  input  logic       ex_ready_i,
  output uop_t       ex_uop_o,
  output vreg_data_t ex_vs1_o,
  output vreg_data_t ex_vs2_o
);

  logic       valid_q;
  uop_t       uop_q;
  logic [1:0] need_q, have_q;
  vreg_data_t data_q [2];
  logic       noted_q, rel_pend_q;
  vreg_mask_t rel_mask_q;

  logic       done, pend, rel_now, ex_fire, accept, head_ok;
  vreg_mask_t pmask;

  assign done    = valid_q && (&have_q);
  assign pend    = rel_pend_q || (done && !noted_q);
  assign pmask   = rel_pend_q ? rel_mask_q : uop_rd_mask(uop_q);
  assign head_ok = head_valid_i && head_locked_i;
  assign rel_now = pend && (!head_valid_i || head_locked_i);
  assign rel_rd_o = rel_now ? (pmask & ~(head_ok ? uop_rd_mask(head_uop_i) : '0)) : '0;

  assign ex_valid_o = done;
  assign ex_uop_o   = uop_q;
  assign ex_vs1_o   = data_q[0];
  assign ex_vs2_o   = data_q[1];
  assign ex_fire    = done && ex_ready_i;

  assign accept = head_ok && (!valid_q || ex_fire) && (!pend || rel_now);
  assign pop_o  = accept;

  assign busy_o     = valid_q;
  assign lock_req_o = valid_q && head_valid_i && !head_locked_i;

  assign rd_req_o[0]  = valid_q && need_q[0];
  assign rd_req_o[1]  = valid_q && need_q[1];
  assign rd_addr_o[0] = uop_q.vs1;
  assign rd_addr_o[1] = uop_q.vs2;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_q    <= 1'b0;
      uop_q      <= '0;
      need_q     <= '0;
      have_q     <= '0;
      data_q[0]  <= '0;
      data_q[1]  <= '0;
      noted_q    <= 1'b0;
      rel_pend_q <= 1'b0;
      rel_mask_q <= '0;
    end else begin
      for (int c = 0; c < 2; c++) begin
        if (rd_gnt_i[c])   need_q[c] <= 1'b0;
        if (rd_valid_i[c]) begin
          data_q[c] <= rd_data_i[c];
          have_q[c] <= 1'b1;
        end
      end
      // remember an outstanding release once the reads are complete
      if (done && !noted_q) begin
        noted_q <= 1'b1;
        if (!rel_now) begin
          rel_pend_q <= 1'b1;
          rel_mask_q <= uop_rd_mask(uop_q);
        end
      end else if (rel_now) begin
        rel_pend_q <= 1'b0;
      end
      if (accept) begin
        valid_q <= 1'b1;
        uop_q   <= head_uop_i;
        need_q  <= {head_uop_i.use_vs2, head_uop_i.use_vs1};
        have_q  <= {!head_uop_i.use_vs2, !head_uop_i.use_vs1};
        noted_q <= 1'b0;
      end else if (ex_fire) begin
        valid_q <= 1'b0;
      end
    end
  end

endmodule
