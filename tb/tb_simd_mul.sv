// tb_simd_mul: streams random multiplications through the one-stage
// multiplier with random back-pressure; checks each result against the
// reference, the one-cycle latency and that nothing is lost or duplicated.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_simd_mul;
  import vu_pkg::*;
  import vtb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  logic iv, ir, ov, ordy, us; vop_e op; vsew_e sew; logic [63:0] sc, sres;
  vreg_data_t a, b, res; exception_t ex;
  simd_mul dut (.clk_i(clk), .rst_ni(rst_n), .in_valid_i(iv), .in_ready_o(ir), .op_i(op), .sew_i(sew),
    .use_scalar_i(us), .scalar_i(sc), .vs1_i(a), .vs2_i(b), .out_valid_o(ov), .out_ready_i(ordy),
    .result_o(res), .scalar_result_o(sres), .exception_o(ex));
  vop_e ops [3] = '{VMUL, VMULH, VMULHU};
  vreg_data_t exp_q [$];
  int sent = 0, got = 0;
  function automatic vreg_data_t expect_res();
    vreg_data_t r; int w; w = 8 << sew; r = '0;
    for (int e = 0; e < VLEN / w; e++)
      r |= VLEN'(ref_elem(op, us ? sc : zx(64'(a >> (e * w)), w), zx(64'(b >> (e * w)), w), w)) << (e * w);
    return r;
  endfunction
  initial begin
    iv = 0; ordy = 0; op = VMUL; sew = SEW8; us = 0; sc = 0; a = 0; b = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // latency: accepted at one edge, valid right after it
    @(negedge clk); iv = 1; ordy = 1; a = {4{32'h0102_0304}}; b = {4{32'h0506_0708}};
    check(ir, "ready when empty"); @(posedge clk); #1; iv = 0;
    check(ov && res == expect_res(), "result one cycle after acceptance");
    @(negedge clk); ordy = 1; @(negedge clk);
    check(!ov, "result drained");
    while (sent < 1000) begin
      ordy = $urandom_range(0, 3) != 0;
      iv = $urandom_range(0, 1);
      op = ops[$urandom_range(0, 2)]; sew = vsew_e'($urandom_range(0, 3)); us = $urandom_range(0, 1);
      sc = {$urandom, $urandom}; a = {$urandom, $urandom, $urandom, $urandom}; b = {$urandom, $urandom, $urandom, $urandom};
      #1;
      if (ov && ordy) begin
        check(exp_q.size() > 0 && res == exp_q.pop_front(), "streamed result"); got++;
      end
      if (iv && ir) begin exp_q.push_back(expect_res()); sent++; end
      @(negedge clk);
    end
    iv = 0; ordy = 1; #1;
    if (ov) begin check(res == exp_q.pop_front(), "last result"); got++; end
    check(got == sent && !ex.valid && sres == 0, "all results delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
