// vrf_allocator: lock table of the vector register file.
//
// Implements a two-phase shared locking protocol at micro-op level. Every
// SIMD functional unit (port p) holds a set of read locks and a set of write
// locks, one bit per vector register. A lock request carries the read and
// write masks of one micro-op and is granted in the same cycle, all locks at
// once, when:
//   - no register it reads is write-locked (by any unit, including itself:
//     an older micro-op of the same unit still has to write it back);
//   - the register it writes is neither write-locked by anyone nor
//     read-locked by another unit (the unit's own read locks belong to older
//     micro-ops that read before this one can write).
// Read locks are released by an explicit mask from the read-operand stage.
// A write lock is released automatically when the VRF acknowledges the
// write of that register by the same unit.
// The rules come from the source; the per-unit bit masks, the same-cycle
// grant and the lowest-index-first order among simultaneous requests are
// this design's choices.
module vrf_allocator
  import vu_pkg::*;
#(
  parameter int unsigned NR_PORTS = NR_FUS
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        lock_req_i [NR_PORTS],
  input  vreg_mask_t  lock_rd_i  [NR_PORTS],
  input  vreg_mask_t  lock_wr_i  [NR_PORTS],
  output logic        lock_gnt_o [NR_PORTS],
  input  vreg_mask_t  rel_rd_i   [NR_PORTS],
  input  logic        wr_ack_i   [NR_PORTS],
  input  vreg_idx_t   wr_addr_i  [NR_PORTS],
  output vreg_mask_t  rd_locks_o [NR_PORTS],
  output vreg_mask_t  wr_locks_o [NR_PORTS]
);

  vreg_mask_t rd_q [NR_PORTS];
  vreg_mask_t wr_q [NR_PORTS];

  always_comb begin
    vreg_mask_t any_wr, other_rd, new_rd, new_wr;
    new_rd = '0;
    new_wr = '0;
    for (int p = 0; p < NR_PORTS; p++) begin
      any_wr   = new_wr;
      other_rd = new_rd;
      for (int q = 0; q < NR_PORTS; q++) begin
        any_wr |= wr_q[q];
        if (q != p) other_rd |= rd_q[q];
      end
      lock_gnt_o[p] = lock_req_i[p]
                    && ((lock_rd_i[p] & any_wr) == '0)
                    && ((lock_wr_i[p] & (any_wr | other_rd)) == '0);
      // locks granted to a lower port this cycle count as held
      if (lock_gnt_o[p]) begin
        new_rd |= lock_rd_i[p];
        new_wr |= lock_wr_i[p];
      end
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int p = 0; p < NR_PORTS; p++) begin
        rd_q[p] <= '0;
        wr_q[p] <= '0;
      end
    end else begin
      for (int p = 0; p < NR_PORTS; p++) begin
        rd_q[p] <= (rd_q[p] & ~rel_rd_i[p]) | (lock_gnt_o[p] ? lock_rd_i[p] : '0);
        wr_q[p] <= (wr_q[p] & ~(wr_ack_i[p] ? reg_bit(wr_addr_i[p]) : '0))
                 | (lock_gnt_o[p] ? lock_wr_i[p] : '0);
      end
    end
  end

  for (genvar p = 0; p < NR_PORTS; p++) begin : g_out
    assign rd_locks_o[p] = rd_q[p];
    assign wr_locks_o[p] = wr_q[p];
  end

endmodule
