// tb_uop_queue: FIFO order under random push/pop, the head lock request only
// while the read stage is empty, a pop only for a locked head, and full
// back-pressure at DEPTH entries.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_uop_queue;
  import vu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  logic pv, pr, hv, hl, pop, busy, lreq, lgnt; uop_t pu, hu; logic [2:0] cnt;
  uop_queue #(.DEPTH(4)) dut (.clk_i(clk), .rst_ni(rst_n), .push_valid_i(pv), .push_ready_o(pr), .push_uop_i(pu),
    .head_valid_o(hv), .head_uop_o(hu), .head_locked_o(hl), .pop_i(pop), .ro_busy_i(busy),
    .lock_req_o(lreq), .lock_gnt_i(lgnt), .count_o(cnt));
  uop_t q [$];
  int n_full = 0;
  initial begin
    pv = 0; pu = '0; pop = 0; busy = 0; lgnt = 0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    // fill to full
    for (int i = 0; i < 5; i++) begin
      pv = 1; pu = '0; pu.scalar = 64'(i); #1;
      if (i < 4) begin check(pr, "room until DEPTH"); q.push_back(pu); end
      else check(!pr, "full after DEPTH entries");
      @(negedge clk);
    end
    pv = 0; busy = 1; #1; check(!lreq, "no lock request while the read stage is busy");
    busy = 0; #1; check(lreq && hv && !hl, "lock request for the first micro-op");
    pop = 1; #1; @(negedge clk); check(cnt == 4, "no pop of an unlocked head");
    pop = 0;
    for (int i = 0; i < 3000; i++) begin
      pv = $urandom_range(0, 1); pu = '0; pu.scalar = {$urandom, $urandom};
      busy = $urandom_range(0, 1);
      lgnt = hv && !hl && $urandom_range(0, 1);
      pop = hl && $urandom_range(0, 1);
      #1;
      if (!pr && pv) n_full++;
      if (pop) begin check(hu == q[0], "head in FIFO order"); void'(q.pop_front()); end
      if (pv && pr) q.push_back(pu);
      check(lreq == (hv && !hl && !busy), "lock request rule");
      @(negedge clk);
      check(int'(cnt) == q.size(), "occupancy");
    end
    check(n_full > 0, "back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
