// simd_fu: one SIMD functional unit of the execution stage.
//
// A chain of uop_queue -> simd_read_operands (RO) -> execute (EX) ->
// simd_write_back (WB). The EX is the only part that depends on the
// unit's function and sees nothing but the functional-unit interface; this
// module is the "opaque wrapper" around it: it prepares operands, keeps the
// micro-op's metadata alongside the EX in a small FIFO (so an EX may be
// combinational or pipelined), and handles locking, VRF access and write
// back. FU selects the EX: FU_ALU (simd_alu, combinational) or FU_MUL
// (simd_mul, one stage).
// The queue and the RO/EX/WB split follow the source; the metadata FIFO
// and the choice of units are this design's.
//
// The queue's occupancy output (count_o) is left unconnected here; it is
// there for observation and testing, so lint reports the empty pin.
module simd_fu
  import vu_pkg::*;
#(
  parameter fu_e         FU          = FU_ALU,
  parameter int unsigned QUEUE_DEPTH = 4
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  // from the dispatcher
  input  logic            uop_valid_i,
  output logic            uop_ready_o,
  input  uop_t            uop_i,
  // lock port
  output logic            lock_req_o,
  output vreg_mask_t      lock_rd_o,
  output vreg_mask_t      lock_wr_o,
  input  logic            lock_gnt_i,
  output vreg_mask_t      rel_rd_o,
  // VRF read channels
  output logic            rd_req_o   [2],
  output vreg_idx_t       rd_addr_o  [2],
  input  logic            rd_gnt_i   [2],
  input  logic            rd_valid_i [2],
  input  vreg_data_t      rd_data_i  [2],
  // VRF write channel
  output logic            wr_req_o,
  output vreg_idx_t       wr_addr_o,
  output vreg_data_t      wr_data_o,
  output vreg_be_t        wr_be_o,
  input  logic            wr_ack_i,
  // vector write back
  output logic            vwb_req_o,
  output wb_req_t         vwb_data_o,
  input  logic            vwb_gnt_i,
  output logic            retire_o,
  output uop_t            retire_uop_o
);

  logic head_valid, head_locked, pop, ro_busy, q_lock_req, ro_lock_req;
  uop_t head_uop;

  uop_queue #(.DEPTH(QUEUE_DEPTH)) i_queue (
    .clk_i, .rst_ni,
    .push_valid_i  (uop_valid_i),
    .push_ready_o  (uop_ready_o),
    .push_uop_i    (uop_i),
    .head_valid_o  (head_valid),
    .head_uop_o    (head_uop),
    .head_locked_o (head_locked),
    .pop_i         (pop),
    .ro_busy_i     (ro_busy),
    .lock_req_o    (q_lock_req),
    .lock_gnt_i,
    .count_o       ()
  );

  // the queue locks the first active micro-op, RO the following ones
  assign lock_req_o = q_lock_req || ro_lock_req;
  assign lock_rd_o  = uop_rd_mask(head_uop);
  assign lock_wr_o  = uop_wr_mask(head_uop);

  logic       ro_valid, ro_ready;
  uop_t       ro_uop;
  vreg_data_t ro_vs1, ro_vs2;

  simd_read_operands i_ro (
    .clk_i, .rst_ni,
    .head_valid_i  (head_valid),
    .head_uop_i    (head_uop),
    .head_locked_i (head_locked),
    .pop_o         (pop),
    .busy_o        (ro_busy),
    .lock_req_o    (ro_lock_req),
    .rel_rd_o,
    .rd_req_o, .rd_addr_o, .rd_gnt_i, .rd_valid_i, .rd_data_i,
    .ex_valid_o    (ro_valid),
    .ex_ready_i    (ro_ready),
    .ex_uop_o      (ro_uop),
    .ex_vs1_o      (ro_vs1),
    .ex_vs2_o      (ro_vs2)
  );

  // metadata of the micro-ops inside the EX
  localparam int unsigned META_DEPTH = 2;
  uop_t       meta_q [META_DEPTH];
  logic [1:0] meta_cnt_q;
  logic       meta_full;

  logic            ex_in_valid, ex_in_ready, ex_out_valid, ex_out_ready;
  vreg_data_t      ex_result;
  logic [XLEN-1:0] ex_scalar;
  exception_t      ex_ex;

  assign meta_full   = meta_cnt_q == 2'(META_DEPTH);
  assign ex_in_valid = ro_valid && !meta_full;
  assign ro_ready    = ex_in_ready && !meta_full;

  if (FU == FU_ALU) begin : g_alu
    simd_alu i_ex (
      .in_valid_i      (ex_in_valid),
      .in_ready_o      (ex_in_ready),
      .op_i            (ro_uop.op),
      .sew_i           (ro_uop.sew),
      .use_scalar_i    (!ro_uop.use_vs1),
      .scalar_i        (ro_uop.scalar),
      .vs1_i           (ro_vs1),
      .vs2_i           (ro_vs2),
      .out_valid_o     (ex_out_valid),
      .out_ready_i     (ex_out_ready),
      .result_o        (ex_result),
      .scalar_result_o (ex_scalar),
      .exception_o     (ex_ex)
    );
  end else begin : g_mul
    simd_mul i_ex (
      .clk_i, .rst_ni,
      .in_valid_i      (ex_in_valid),
      .in_ready_o      (ex_in_ready),
      .op_i            (ro_uop.op),
      .sew_i           (ro_uop.sew),
      .use_scalar_i    (!ro_uop.use_vs1),
      .scalar_i        (ro_uop.scalar),
      .vs1_i           (ro_vs1),
      .vs2_i           (ro_vs2),
      .out_valid_o     (ex_out_valid),
      .out_ready_i     (ex_out_ready),
      .result_o        (ex_result),
      .scalar_result_o (ex_scalar),
      .exception_o     (ex_ex)
    );
  end

  logic ex_in_fire, ex_out_fire;
  assign ex_in_fire  = ex_in_valid && ex_in_ready;
  assign ex_out_fire = ex_out_valid && ex_out_ready;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      meta_cnt_q <= '0;
      for (int i = 0; i < META_DEPTH; i++) meta_q[i] <= '0;
    end else begin
      // meta_q[0] is the oldest micro-op in the EX
      unique case ({ex_in_fire, ex_out_fire})
        2'b10: begin
          meta_q[meta_cnt_q[0]] <= ro_uop;
          meta_cnt_q <= meta_cnt_q + 1'b1;
        end
        2'b01: begin
          meta_q[0]  <= meta_q[1];
          meta_cnt_q <= meta_cnt_q - 1'b1;
        end
        2'b11: begin
          if (meta_cnt_q == 2'd2) begin
            meta_q[0] <= meta_q[1];
            meta_q[1] <= ro_uop;
          end else begin
            meta_q[0] <= ro_uop;
          end
        end
        default: ;
      endcase
    end
  end

  // a combinational EX produces its output in the cycle of its input
  uop_t ex_uop;
  assign ex_uop = (meta_cnt_q == 0) ? ro_uop : meta_q[0];

  simd_write_back i_wb (
    .clk_i, .rst_ni,
    .in_valid_i  (ex_out_valid),
    .in_ready_o  (ex_out_ready),
    .in_uop_i    (ex_uop),
    .in_result_i (ex_result),
    .in_scalar_i (ex_scalar),
    .in_ex_i     (ex_ex),
    .wr_req_o, .wr_addr_o, .wr_data_o, .wr_be_o, .wr_ack_i,
    .vwb_req_o, .vwb_data_o, .vwb_gnt_i,
    .retire_o, .retire_uop_o
  );

endmodule
