// tb_vector_dispatcher: random arithmetic instructions with random SEW, LMUL
// and vl go through the dispatcher while the testbench plays both functional
// units (random ready, in-order retirement at random times). Every micro-op
// is compared with a model of the split (register offsets, byte enables,
// last flag), and the hazard rule is checked every cycle: a micro-op may be
// offered only if it has no RAW/WAR/WAW conflict with micro-ops in flight in
// the other unit, and hazard_o must be high exactly when one is held back.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_vector_dispatcher;
  import vu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic v, r, hz; decoded_t d;
  logic uv [NR_FUS]; logic ur [NR_FUS]; uop_t uo [NR_FUS];
  logic ret [NR_FUS]; uop_t ret_u [NR_FUS];
  vector_dispatcher dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(v), .ready_o(r), .dec_i(d),
    .uop_valid_o(uv), .uop_ready_i(ur), .uop_o(uo), .retire_i(ret), .retire_uop_i(ret_u), .hazard_o(hz));

  uop_t exp_q [$];      // micro-ops still expected, in order
  uop_t infl [NR_FUS][$];
  int n_uops = 0, n_held = 0, n_instr = 0;

  function automatic vreg_mask_t rmask(uop_t u);
    vreg_mask_t m = '0;
    if (u.use_vs1) m[u.vs1] = 1'b1;
    if (u.use_vs2) m[u.vs2] = 1'b1;
    return m;
  endfunction
  function automatic vreg_mask_t wmask(uop_t u);
    vreg_mask_t m = '0;
    if (u.writes_vd) m[u.vd] = 1'b1;
    return m;
  endfunction

  // expected split of one instruction
  task automatic expect_instr(decoded_t x);
    int epr, n;
    epr = VLENB >> x.sew;
    n = (x.op == VMVXS || x.vl == 0) ? 1 : (int'(x.vl) + epr - 1) / epr;
    for (int i = 0; i < n; i++) begin
      uop_t u; int act;
      u = '0; u.op = x.op; u.sew = x.sew; u.trans_id = x.trans_id; u.scalar = x.scalar;
      u.writes_vd = x.writes_vd; u.writes_scalar = x.writes_scalar;
      u.vd = x.vd + 5'(i); u.vs1 = x.vs1 + 5'(i); u.vs2 = x.vs2 + 5'(i);
      u.use_vs1 = x.src == SRC_VV && x.op != VMVXS; u.use_vs2 = x.op != VMV;
      if (x.op == VMVXS) u.vs2 = x.vs2;
      act = int'(x.vl) - i * epr; if (act < 0) act = 0; if (act > epr) act = epr;
      for (int b = 0; b < VLENB; b++) u.be[b] = b < act * (1 << x.sew);
      u.last = i == n - 1;
      exp_q.push_back(u);
    end
  endtask

  task automatic random_instr(output decoded_t x);
    int lm, k;
    x = '0;
    k = $urandom_range(0, 9);
    x.fu = k < 5 ? FU_ALU : FU_MUL;
    x.op = (k == 0) ? VMVXS : (k == 1) ? VMV : (k < 5) ? VADD : VMUL;
    x.src = vsrc_e'($urandom_range(0, 1));
    lm = (x.op == VMVXS) ? 0 : $urandom_range(0, 3);
    x.lmul = 2'(lm);
    x.sew = vsew_e'($urandom_range(0, 3));
    x.vl = vl_t'($urandom_range(0, (VLENB << lm) >> x.sew));
    // registers aligned to the group size, in a small range so hazards are common
    x.vd  = 5'(($urandom_range(0, 15) >> lm) << lm);
    x.vs1 = 5'(($urandom_range(0, 15) >> lm) << lm);
    x.vs2 = 5'(($urandom_range(0, 15) >> lm) << lm);
    x.writes_vd = x.op != VMVXS;
    x.writes_scalar = x.op == VMVXS;
    x.scalar = {$urandom, $urandom};
    x.trans_id = trans_id_t'(n_instr);
  endtask

  // the testbench's units: accept, keep in flight, retire in order
  always @(negedge clk) if (rst_n) begin
    int f;
    f = -1;
    for (int i = 0; i < NR_FUS; i++) if (uv[i]) begin check(f == -1, "one unit at a time"); f = i; end
    // retire
    for (int i = 0; i < NR_FUS; i++) begin
      ret[i] = infl[i].size() != 0 && $urandom_range(0, 2) == 0;
      ret_u[i] = ret[i] ? infl[i][0] : '0;
    end
    for (int i = 0; i < NR_FUS; i++) ur[i] = infl[i].size() < 6 && $urandom_range(0, 3) != 0;
  end

  // checks at the clock edge, with the values that are being sampled
  always @(posedge clk) if (rst_n) begin
    // hazard flag: pending micro-op conflicts
    if (exp_q.size() != 0 && !r) begin
      vreg_mask_t o_rd, o_wr; logic conf; int fu;
      fu = (exp_q[0].op inside {VMUL, VMULH, VMULHU}) ? 1 : 0;
      o_rd = '0; o_wr = '0;
      foreach (infl[1-fu][k]) begin o_rd |= rmask(infl[1-fu][k]); o_wr |= wmask(infl[1-fu][k]); end
      conf = ((rmask(exp_q[0]) & o_wr) | (wmask(exp_q[0]) & (o_rd | o_wr))) != '0;
      check(hz == conf && uv[fu] == !conf, "hazard flag and valid match the model");
      if (conf) n_held++;
    end
    for (int i = 0; i < NR_FUS; i++) begin
      vreg_mask_t o_rd, o_wr; logic conf;
      o_rd = '0; o_wr = '0;
      for (int j = 0; j < NR_FUS; j++) if (j != i) foreach (infl[j][k]) begin
        o_rd |= rmask(infl[j][k]); o_wr |= wmask(infl[j][k]);
      end
      if (uv[i]) begin
        checks++;
        if (exp_q.size() == 0 || uo[i] != exp_q[0]) begin
          failures++; $display("FAIL micro-op mismatch at %0t", $time);
        end
        conf = ((rmask(uo[i]) & o_wr) | (wmask(uo[i]) & (o_rd | o_wr))) != '0;
        check(!conf, "offered a micro-op that conflicts with the other unit");
        if (ur[i]) begin
          infl[i].push_back(uo[i]); void'(exp_q.pop_front()); n_uops++;
        end
      end
    end
    for (int i = 0; i < NR_FUS; i++) if (ret[i]) void'(infl[i].pop_front());
  end

  initial begin
    v = 0; d = '0;
    foreach (ur[i]) begin ur[i] = 0; ret[i] = 0; ret_u[i] = '0; end
    repeat (2) @(negedge clk); rst_n = 1;
    while (n_instr < 400) begin
      @(negedge clk);
      #1;
      if (r && exp_q.size() == 0 && $urandom_range(0, 1) == 0) begin
        decoded_t x;
        random_instr(x);
        v = 1; d = x; expect_instr(x); n_instr++;
        @(posedge clk); #1; v = 0;
      end
    end
    while (exp_q.size() != 0) @(negedge clk);
    check(n_held > 0, "some micro-ops were held by a hazard");
    $display("instructions %0d micro-ops %0d held cycles %0d", n_instr, n_uops, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
