// tb_vrf_bank: checks the 1RW bank: one-cycle read latency, byte-enable
// writes leave other bytes alone, and a read cycle does not write.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_vrf_bank;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic en, we; logic [2:0] addr; logic [127:0] wdata, rdata; logic [15:0] be;
  logic [127:0] model [8];
  vrf_bank #(.ROWS(8), .WIDTH(128)) dut (.clk_i(clk), .en_i(en), .we_i(we), .addr_i(addr),
    .wdata_i(wdata), .be_i(be), .rdata_o(rdata));

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0; be = 0;
    @(negedge clk);
    for (int r = 0; r < 8; r++) begin
      en = 1; we = 1; addr = 3'(r); be = '1; wdata = {4{$urandom}}; model[r] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 200; i++) begin
      en = 1; we = $urandom_range(0, 1); addr = 3'($urandom_range(0, 7));
      wdata = {$urandom, $urandom, $urandom, $urandom}; be = 16'($urandom);
      if (we) for (int b = 0; b < 16; b++) if (be[b]) model[addr][8*b +: 8] = wdata[8*b +: 8];
      @(negedge clk);
      if (!we) check(rdata == model[addr], "read data one cycle later");
    end
    // a disabled cycle keeps the last read data
    en = 1; we = 0; addr = 3; @(negedge clk);
    en = 0; addr = 5; @(negedge clk);
    check(rdata == model[3], "output held when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
