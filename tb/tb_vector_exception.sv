// tb_vector_exception: an illegal instruction becomes one write-back request
// with cause 2 and the instruction as tval, held until granted; ready is low
// meanwhile.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_vector_exception;
  import vu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic v, r, req, gnt; decoded_t d; wb_req_t o;
  vector_exception dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(v), .ready_o(r), .dec_i(d), .vwb_req_o(req), .vwb_data_o(o), .vwb_gnt_i(gnt));
  initial begin
    v = 0; gnt = 0; d = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    check(r && !req, "idle");
    for (int i = 0; i < 20; i++) begin
      int wait_c;
      v = 1; d = '0; d.illegal = 1; d.instr = $urandom; d.trans_id = trans_id_t'(i);
      @(negedge clk); v = 0;
      wait_c = $urandom_range(0, 4);
      repeat (wait_c) begin
        check(req && !r, "request pending, not ready");
        check(o.ex.valid && o.ex.cause == 64'd2 && o.ex.tval == 64'(d.instr) && o.trans_id == d.trans_id, "payload");
        @(negedge clk);
      end
      gnt = 1; #1; check(req, "still requesting at grant"); @(negedge clk); gnt = 0;
      check(!req && r, "cleared after grant");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
