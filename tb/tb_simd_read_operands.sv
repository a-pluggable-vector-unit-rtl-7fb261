// tb_simd_read_operands: the RO stage between a modelled queue head and a
// modelled VRF with random grant delays. Checks operand data and order, the
// lock request for the next micro-op while busy, and the read-lock release
// rule: only after the reads, never a register the locked next micro-op
// also reads, and every read lock released in the end.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_simd_read_operands;
  import vu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  logic hv, hl, pop, busy, lreq, exv, exr; uop_t hu, exu; vreg_mask_t rel;
  logic rreq [2], rgnt [2], rval [2]; vreg_idx_t raddr [2]; vreg_data_t rdata [2], e1, e2;
  simd_read_operands dut (.clk_i(clk), .rst_ni(rst_n), .head_valid_i(hv), .head_uop_i(hu), .head_locked_i(hl),
    .pop_o(pop), .busy_o(busy), .lock_req_o(lreq), .rel_rd_o(rel), .rd_req_o(rreq), .rd_addr_o(raddr),
    .rd_gnt_i(rgnt), .rd_valid_i(rval), .rd_data_i(rdata), .ex_valid_o(exv), .ex_ready_i(exr),
    .ex_uop_o(exu), .ex_vs1_o(e1), .ex_vs2_o(e2));
  vreg_data_t model [32];
  uop_t pending [$], inflight [$];
  vreg_mask_t held;
  logic [4:0] gaddr [2]; logic gq [2];
  int n_out = 0, n_keep = 0;
  logic pop_s, lk_s; vreg_mask_t rel_s;
  localparam int N = 600;
  initial begin
    for (int r = 0; r < 32; r++) model[r] = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < N; i++) begin
      uop_t u; u = '0;
      u.vs1 = vreg_idx_t'($urandom_range(0, 7)); u.vs2 = vreg_idx_t'($urandom_range(0, 7));
      u.use_vs1 = $urandom_range(0, 1); u.use_vs2 = $urandom_range(0, 3) != 0;
      u.scalar = 64'(i);
      pending.push_back(u);
    end
  end
  task automatic show_head();
    hv = pending.size() > 0;
    hu = hv ? pending[0] : '0;
  endtask
  // VRF model: random grant, data one cycle later
  always_ff @(posedge clk) for (int c = 0; c < 2; c++) begin
    gq[c] <= rgnt[c]; gaddr[c] <= raddr[c];
  end
  always_comb for (int c = 0; c < 2; c++) begin
    rval[c] = gq[c]; rdata[c] = model[gaddr[c]];
  end
  initial begin
    hl = 0; exr = 0; held = '0; rgnt[0] = 0; rgnt[1] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    show_head();
    while (n_out < N) begin
      @(negedge clk);
      for (int c = 0; c < 2; c++) rgnt[c] = rreq[c] && $urandom_range(0, 2) != 0;
      exr = $urandom_range(0, 3) != 0;
      #1;
      check(lreq == (busy && hv && !hl), "next-micro-op lock request while busy");
      // reads before release: the micro-op still reading holds its locks
      if (hl) check((rel & uop_rd_mask(hu)) == '0, "locks of the next micro-op kept");
      if (hl && (rel != 0) && (held & uop_rd_mask(hu)) != 0) n_keep++;
      check((rel & ~held) == '0, "release only of held read locks");
      if (exv && exr) begin
        uop_t u; u = inflight.pop_front();
        check(exu == u, "micro-op order"); if (exu != u && failures < 4) $display("got %0d exp %0d t=%0t", exu.scalar, u.scalar, $time);
        if (u.use_vs1) check(e1 == model[u.vs1], "vs1 data");
        if (u.use_vs2) check(e2 == model[u.vs2], "vs2 data");
        n_out++;
      end
      pop_s = pop; rel_s = rel; lk_s = lreq || !busy;
      @(posedge clk); #1;
      held = held & ~rel_s;
      if (pop_s) begin
        check(hl, "only a locked head is popped");
        inflight.push_back(pending.pop_front());
        held |= uop_rd_mask(inflight[$]);
        hl = 0;
      end else if (hv && !hl && lk_s && $urandom_range(0, 1)) begin
        hl = 1;  // lock granted (by the RO request or, when idle, the queue's)
      end
      show_head();
    end
    repeat (5) begin @(negedge clk); #1; rel_s = rel; @(posedge clk); held = held & ~rel_s; end
    check(held == '0, "all read locks released at the end");
    check(n_keep > 0, "shared read lock kept at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
