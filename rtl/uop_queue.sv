// uop_queue: micro-operation queue in front of one SIMD functional unit.
//
// An in-order FIFO of micro-ops written by the dispatcher (valid/ready). The
// queue locks the operand registers of its head only when the unit's read
// operand stage is empty, i.e. for the first active micro-op; while that
// stage is busy it locks the next micro-op itself (chaining). Either way the
// grant marks the head as locked, and only a locked head can be popped into
// the read operand stage.
// The queue, and that it locks for the first micro-op only, follow the
// source; DEPTH = 4 and the same-cycle push/pop FIFO are this design's.
module uop_queue
  import vu_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  // from the dispatcher
  input  logic       push_valid_i,
  output logic       push_ready_o,
  input  uop_t       push_uop_i,
  // head toward the read operand stage
  output logic       head_valid_o,
  output uop_t       head_uop_o,
  output logic       head_locked_o,
  input  logic       pop_i,
  // lock port (shared with the read operand stage)
  input  logic       ro_busy_i,
  output logic       lock_req_o,
  input  logic       lock_gnt_i,
  // number of queued micro-ops
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  localparam int unsigned PTR_BITS = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  uop_t                    mem_q [DEPTH];
  logic [PTR_BITS-1:0]     rd_ptr_q, wr_ptr_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;
  logic                    locked_q;

  logic push, pop;

  assign head_valid_o  = cnt_q != 0;
  assign head_uop_o    = mem_q[rd_ptr_q];
  assign head_locked_o = locked_q;
  assign push_ready_o  = cnt_q != DEPTH[$clog2(DEPTH+1)-1:0];
  assign push          = push_valid_i && push_ready_o;
  assign pop           = pop_i && head_valid_o && locked_q;
  assign lock_req_o    = head_valid_o && !locked_q && !ro_busy_i;
  assign count_o       = cnt_q;

  function automatic logic [PTR_BITS-1:0] inc(input logic [PTR_BITS-1:0] p);
    return (p == PTR_BITS'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_ptr_q <= '0;
      wr_ptr_q <= '0;
      cnt_q    <= '0;
      locked_q <= 1'b0;
    end else begin
      if (push) begin
        mem_q[wr_ptr_q] <= push_uop_i;
        wr_ptr_q        <= inc(wr_ptr_q);
      end
      if (pop) rd_ptr_q <= inc(rd_ptr_q);
      cnt_q <= cnt_q + $bits(cnt_q)'(push) - $bits(cnt_q)'(pop);
      // a grant always refers to the current head
      if (pop)             locked_q <= 1'b0;
      else if (lock_gnt_i) locked_q <= 1'b1;
    end
  end

  assert property (@(posedge clk_i) disable iff (!rst_ni) lock_gnt_i |-> head_valid_o && !locked_q)
    else $error("lock grant without a head to lock");

endmodule
