// tb_vrf: the banked register file with two units. Checks that a write is
// acked in its cycle and a read returns one cycle after its grant, that
// registers of different banks are served in parallel, that writes win over
// reads in a bank and lower units over higher ones, that every register
// keeps its data, and that locks go through the allocator.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_vrf;
  import vu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  logic lreq [2], lgnt [2], wreq [2], wack [2];
  vreg_mask_t lrd [2], lwr [2], rel [2];
  logic rreq [2][2], rgnt [2][2], rval [2][2];
  vreg_idx_t raddr [2][2], waddr [2];
  vreg_data_t rdata [2][2], wdata [2];
  vreg_be_t wbe [2];
  vrf #(.NR_PORTS(2)) dut (.clk_i(clk), .rst_ni(rst_n), .lock_req_i(lreq), .lock_rd_i(lrd), .lock_wr_i(lwr),
    .lock_gnt_o(lgnt), .rel_rd_i(rel), .rd_req_i(rreq), .rd_addr_i(raddr), .rd_gnt_o(rgnt),
    .rd_valid_o(rval), .rd_data_o(rdata), .wr_req_i(wreq), .wr_addr_i(waddr), .wr_data_i(wdata),
    .wr_be_i(wbe), .wr_ack_o(wack));
  vreg_data_t model [32];
  task automatic idle();
    for (int p = 0; p < 2; p++) begin
      lreq[p] = 0; lrd[p] = 0; lwr[p] = 0; rel[p] = 0; wreq[p] = 0; waddr[p] = 0; wdata[p] = 0; wbe[p] = 0;
      for (int c = 0; c < 2; c++) begin rreq[p][c] = 0; raddr[p][c] = 0; end
    end
  endtask
  initial begin
    idle(); repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    // unit 0 takes write locks on all even registers, unit 1 on all odd ones
    lreq[0] = 1; lwr[0] = 32'h5555_5555; lreq[1] = 1; lwr[1] = 32'hAAAA_AAAA; #1;
    check(lgnt[0] && lgnt[1], "write locks granted");
    @(negedge clk); idle();
    // write all registers, two per cycle (different banks)
    for (int r = 0; r < 32; r += 2) begin
      wreq[0] = 1; waddr[0] = vreg_idx_t'(r); wdata[0] = {$urandom, $urandom, $urandom, $urandom}; wbe[0] = '1;
      wreq[1] = 1; waddr[1] = vreg_idx_t'(r + 1); wdata[1] = {$urandom, $urandom, $urandom, $urandom}; wbe[1] = '1;
      model[r] = wdata[0]; model[r + 1] = wdata[1];
      #1; check(wack[0] && wack[1], "two writes to two banks in one cycle");
      @(negedge clk);
    end
    idle();
    check(dut.wr_locks[0] == 0 && dut.wr_locks[1] == 0, "write locks released on ack");
    // both units read-lock everything
    lreq[0] = 1; lrd[0] = '1; lreq[1] = 1; lrd[1] = '1; #1; check(lgnt[0] && lgnt[1], "shared read locks");
    @(negedge clk); idle();
    // same bank: unit 0 channel 0 wins over unit 1
    rreq[0][0] = 1; raddr[0][0] = 5'd4; rreq[1][1] = 1; raddr[1][1] = 5'd8; #1;
    check(rgnt[0][0] && !rgnt[1][1], "same bank: lower unit first");
    @(posedge clk); #1; check(rval[0][0] && rdata[0][0] == model[4], "read data one cycle after grant");
    @(negedge clk); idle();
    // random reads, four channels at once
    for (int i = 0; i < 400; i++) begin
      vreg_idx_t a [2][2];
      logic g [2][2];
      for (int p = 0; p < 2; p++) for (int c = 0; c < 2; c++) begin
        rreq[p][c] = $urandom_range(0, 1); raddr[p][c] = vreg_idx_t'($urandom_range(0, 31)); a[p][c] = raddr[p][c];
      end
      #1;
      for (int p = 0; p < 2; p++) for (int c = 0; c < 2; c++) g[p][c] = rgnt[p][c];
      // at most one grant per bank
      for (int b = 0; b < 4; b++) begin
        int n; n = 0;
        for (int p = 0; p < 2; p++) for (int c = 0; c < 2; c++) if (g[p][c] && a[p][c][1:0] == 2'(b)) n++;
        check(n <= 1, "one access per bank and cycle");
      end
      @(posedge clk); #1;
      for (int p = 0; p < 2; p++) for (int c = 0; c < 2; c++)
        if (g[p][c]) check(rval[p][c] && rdata[p][c] == model[a[p][c]], "random read data");
        else check(!rval[p][c], "no data without grant");
      @(negedge clk); idle();
    end
    // a write beats a read of the same bank; partial byte enables
    rel[0] = '1; rel[1] = '1; @(negedge clk); idle();
    lreq[1] = 1; lwr[1] = 32'h0000_0020; lreq[0] = 1; lrd[0] = 32'h0000_0002; @(negedge clk); idle();
    wreq[1] = 1; waddr[1] = 5'd5; wdata[1] = '1; wbe[1] = 16'h00FF;
    rreq[0][0] = 1; raddr[0][0] = 5'd1; #1;
    check(wack[1] && !rgnt[0][0], "write before read in a bank");
    model[5][63:0] = '1;
    @(negedge clk); idle();
    lreq[0] = 1; lrd[0] = 32'h20; @(negedge clk); idle();
    rreq[0][1] = 1; raddr[0][1] = 5'd5; @(posedge clk); #1;
    check(rdata[0][1] == model[5], "byte enables keep the other bytes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
