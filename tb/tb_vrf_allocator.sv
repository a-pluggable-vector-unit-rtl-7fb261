// tb_vrf_allocator: directed checks of the locking rules: shared reads,
// exclusive writes, own read locks do not block own writes, own write locks
// block own reads, release by mask, write lock dropped on write ack, and
// same-cycle requests of two units seeing each other.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_vrf_allocator;
  import vu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic req [2]; vreg_mask_t rd [2], wr [2], rel [2], rdl [2], wrl [2];
  logic gnt [2], ack [2]; vreg_idx_t waddr [2];

  vrf_allocator #(.NR_PORTS(2)) dut (.clk_i(clk), .rst_ni(rst_n), .lock_req_i(req), .lock_rd_i(rd),
    .lock_wr_i(wr), .lock_gnt_o(gnt), .rel_rd_i(rel), .wr_ack_i(ack), .wr_addr_i(waddr),
    .rd_locks_o(rdl), .wr_locks_o(wrl));

  task automatic idle();
    for (int p = 0; p < 2; p++) begin req[p] = 0; rd[p] = 0; wr[p] = 0; rel[p] = 0; ack[p] = 0; waddr[p] = 0; end
  endtask

  initial begin
    idle();
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    // port 0 locks read v1,v2 write v3
    req[0] = 1; rd[0] = 32'h6; wr[0] = 32'h8; #1; check(gnt[0], "first lock granted");
    @(negedge clk); idle();
    check(rdl[0] == 32'h6 && wrl[0] == 32'h8, "locks held");
    // port 1: reading v1 is shared -> granted; reading v3 (write locked) -> refused
    req[1] = 1; rd[1] = 32'h2; #1; check(gnt[1], "shared read granted");
    rd[1] = 32'h8; #1; check(!gnt[1], "read of write-locked register refused");
    rd[1] = 0; wr[1] = 32'h4; #1; check(!gnt[1], "write of register read-locked by another unit refused");
    req[1] = 0; @(negedge clk);
    // port 0: own read lock does not block its write; own write lock blocks its read
    idle(); req[0] = 1; wr[0] = 32'h2; #1; check(gnt[0], "own read lock does not block own write");
    wr[0] = 0; rd[0] = 32'h8; #1; check(!gnt[0], "own pending write blocks own read");
    wr[0] = 32'h8; rd[0] = 0; #1; check(!gnt[0], "write after write waits");
    req[0] = 0; @(negedge clk);
    // release v1 read lock, ack write of v3
    idle(); rel[0] = 32'h2; ack[0] = 1; waddr[0] = 5'd3; @(negedge clk); idle();
    check(rdl[0] == 32'h4 && wrl[0] == 0, "release by mask and by write ack");
    req[1] = 1; rd[1] = 32'h8; #1; check(gnt[1], "read granted after write ack");
    // two requests in one cycle: port 0 writes v5, port 1 reads v5
    idle(); req[0] = 1; wr[0] = 32'h20; req[1] = 1; rd[1] = 32'h20; #1;
    check(gnt[0] && !gnt[1], "lower port wins a same-cycle conflict");
    // random check against a reference of the rules
    @(negedge clk); idle();
    for (int i = 0; i < 500; i++) begin
      vreg_mask_t anyw, othr; logic exp;
      int p;
      p = $urandom_range(0, 1);
      req[p] = 1; rd[p] = vreg_mask_t'(1) << $urandom_range(0, 7); wr[p] = vreg_mask_t'(1) << $urandom_range(0, 7);
      rel[1 - p] = vreg_mask_t'($urandom) & rdl[1 - p];
      rel[p] = vreg_mask_t'($urandom) & rdl[p];
      ack[1 - p] = $urandom_range(0, 1); waddr[1 - p] = vreg_idx_t'($urandom_range(0, 7));
      #1;
      anyw = wrl[0] | wrl[1]; othr = rdl[1 - p];
      exp = ((rd[p] & anyw) == 0) && ((wr[p] & (anyw | othr)) == 0);
      check(gnt[p] == exp, "random grant matches the rules");
      @(negedge clk); idle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
