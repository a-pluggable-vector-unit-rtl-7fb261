// vector_dispatcher: breaks vector instructions into packed-SIMD micro-ops.
//
// Accepts one decoded instruction (valid/ready) and emits one micro-op per
// cycle to the queue of the instruction's functional unit. Micro-op j works
// on register j of each register group (vd+j, vs1+j, vs2+j). With
// EPR = VLEN / SEW elements per register it emits max(1, ceil(vl / EPR))
// micro-ops, at most LMUL; micro-op j gets byte enables for its active
// elements (min(EPR, vl - j*EPR) of them, none when vl = 0) so that tail
// elements are left undisturbed. vmv.x.s is a single micro-op on vs2.
//
// Inter-unit hazards: micro-ops of different units may run out of order, and
// each unit keeps its own order and locks. So that two units never touch the
// same register in the wrong order, the dispatcher counts, per unit and
// register, the micro-ops that are queued or in flight and read or write it,
// and holds a micro-op back while another unit has a conflicting one
// (read-after-write, write-after-read or write-after-write). Counts go up on
// dispatch and down when the unit's write-back stage retires the micro-op.
// Splitting into LMUL micro-ops follows the source; the tail handling and
// the hazard counters are this design's choices.
//
// Lint reports some fields of the held instruction as unused (raw bits,
// new vtype, LMUL, rs2 value): they belong to other sequencer paths.
module vector_dispatcher
  import vu_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  logic     valid_i,
  output logic     ready_o,
  input  decoded_t dec_i,
  output logic     uop_valid_o [NR_FUS],
  input  logic     uop_ready_i [NR_FUS],
  output uop_t     uop_o       [NR_FUS],
  input  logic     retire_i    [NR_FUS],
  input  uop_t     retire_uop_i[NR_FUS],
  output logic     hazard_o
);

  localparam int unsigned CNT_BITS = 4;
  localparam int unsigned EPR_BITS = $clog2(VLEN / 8 + 1);

  logic      busy_q;
  decoded_t  dec_q;
  logic [2:0] idx_q;
  logic [3:0] nuops;

  logic [CNT_BITS-1:0] rd_cnt_q [NR_FUS][NR_VREGS];
  logic [CNT_BITS-1:0] wr_cnt_q [NR_FUS][NR_VREGS];

  // elements per register at the instruction's SEW
  logic [EPR_BITS-1:0] epr;
  assign epr = EPR_BITS'((VLEN / 8) >> dec_q.sew);

  always_comb begin
    if (dec_q.op == VMVXS || dec_q.vl == '0) nuops = 4'd1;
    else nuops = 4'((int'(dec_q.vl) + int'(epr) - 1) >> ($clog2(VLENB) - int'(dec_q.sew)));
  end

  uop_t uop;
  always_comb begin
    int unsigned first, active;
    uop               = '0;
    uop.op            = dec_q.op;
    uop.vd            = dec_q.vd + REG_BITS'(idx_q);
    uop.vs1           = dec_q.vs1 + REG_BITS'(idx_q);
    uop.vs2           = dec_q.vs2 + REG_BITS'(idx_q);
    uop.use_vs1       = dec_q.src == SRC_VV;
    uop.use_vs2       = dec_q.op != VMV;
    uop.writes_vd     = dec_q.writes_vd;
    uop.writes_scalar = dec_q.writes_scalar;
    uop.scalar        = dec_q.scalar;
    uop.sew           = dec_q.sew;
    uop.last          = 4'(idx_q) == nuops - 1'b1;
    uop.trans_id      = dec_q.trans_id;
    if (dec_q.op == VMVXS) begin
      uop.vs2     = dec_q.vs2;
      uop.use_vs1 = 1'b0;
    end
    first  = int'(idx_q) * int'(epr);
    active = (int'(dec_q.vl) <= first) ? 0 : int'(dec_q.vl) - first;
    if (active > int'(epr)) active = int'(epr);
    for (int b = 0; b < VLENB; b++) uop.be[b] = b < (active << dec_q.sew);
  end

  // conflict with micro-ops of the other units
  logic conflict;
  always_comb begin
    vreg_mask_t rd_m, wr_m, o_rd, o_wr;
    rd_m = uop_rd_mask(uop);
    wr_m = uop_wr_mask(uop);
    o_rd = '0;
    o_wr = '0;
    for (int f = 0; f < NR_FUS; f++)
      if (f != int'(dec_q.fu))
        for (int r = 0; r < NR_VREGS; r++) begin
          o_rd[r] |= rd_cnt_q[f][r] != '0;
          o_wr[r] |= wr_cnt_q[f][r] != '0;
        end
    conflict = ((rd_m & o_wr) | (wr_m & (o_rd | o_wr))) != '0;
  end

  logic fire;
  always_comb begin
    fire = 1'b0;
    for (int f = 0; f < NR_FUS; f++) begin
      uop_valid_o[f] = busy_q && !conflict && int'(dec_q.fu) == f;
      uop_o[f]       = uop;
      if (uop_valid_o[f] && uop_ready_i[f]) fire = 1'b1;
    end
  end

  assign ready_o  = !busy_q;
  assign hazard_o = busy_q && conflict;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q <= 1'b0;
      dec_q  <= '0;
      idx_q  <= '0;
    end else if (!busy_q) begin
      if (valid_i) begin
        busy_q <= 1'b1;
        dec_q  <= dec_i;
        idx_q  <= '0;
      end
    end else if (fire) begin
      idx_q <= idx_q + 1'b1;
      if (uop.last) busy_q <= 1'b0;
    end
  end

  // per-unit, per-register counters of queued and in-flight micro-ops
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int f = 0; f < NR_FUS; f++)
        for (int r = 0; r < NR_VREGS; r++) begin
          rd_cnt_q[f][r] <= '0;
          wr_cnt_q[f][r] <= '0;
        end
    end else begin
      for (int f = 0; f < NR_FUS; f++) begin
        vreg_mask_t inc_rd, inc_wr, dec_rd, dec_wr;
        inc_rd = (fire && int'(dec_q.fu) == f) ? uop_rd_mask(uop) : '0;
        inc_wr = (fire && int'(dec_q.fu) == f) ? uop_wr_mask(uop) : '0;
        dec_rd = retire_i[f] ? uop_rd_mask(retire_uop_i[f]) : '0;
        dec_wr = retire_i[f] ? uop_wr_mask(retire_uop_i[f]) : '0;
        for (int r = 0; r < NR_VREGS; r++) begin
          rd_cnt_q[f][r] <= rd_cnt_q[f][r] + CNT_BITS'(inc_rd[r]) - CNT_BITS'(dec_rd[r]);
          wr_cnt_q[f][r] <= wr_cnt_q[f][r] + CNT_BITS'(inc_wr[r]) - CNT_BITS'(dec_wr[r]);
        end
      end
    end
  end

endmodule
