// tb_vector_config: vl = min(AVL, VLMAX) and the rs1/rd = x0 cases for all
// SEW and LMUL, vill for unsupported vtypes, the write-back payload, and the
// stall: ready stays low from acceptance until the commit of that trans_id
// (a commit of another trans_id does not release it). A second instance
// with STALL_UNTIL_COMMIT = 0 must be ready again right after its write
// back is granted.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_vector_config;
  import vu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic v, r, req, gnt, cack, stall; decoded_t d; wb_req_t o; trans_id_t ctid;
  vector_config dut (.clk_i(clk), .rst_ni(rst_n), .valid_i(v), .ready_o(r), .dec_i(d), .vwb_req_o(req),
    .vwb_data_o(o), .vwb_gnt_i(gnt), .commit_trans_id_i(ctid), .commit_ack_i(cack), .stall_o(stall));
  // the write-back-only variant, driven alongside
  logic r2, req2, stall2; wb_req_t o2;
  vector_config #(.STALL_UNTIL_COMMIT(1'b0)) dut_wb (.clk_i(clk), .rst_ni(rst_n), .valid_i(v), .ready_o(r2), .dec_i(d),
    .vwb_req_o(req2), .vwb_data_o(o2), .vwb_gnt_i(gnt), .commit_trans_id_i(ctid), .commit_ack_i(cack), .stall_o(stall2));

  initial begin
    v = 0; gnt = 0; cack = 0; ctid = 0; d = '0;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      int sew, lm, vmax, avl, exp_vl, cur; int k;
      sew = $urandom_range(0, 3); lm = $urandom_range(0, 3); vmax = (VLEN << lm) / (8 << sew);
      avl = $urandom_range(0, 200); cur = $urandom_range(0, 128); k = $urandom_range(0, 3);
      d = '0; d.is_cfg = 1; d.op = VSETVLI; d.trans_id = trans_id_t'(i);
      d.new_vtype.vsew = vsew_e'(sew); d.new_vtype.vlmul = 2'(lm); d.new_vtype.vill = (k == 3) && ($urandom_range(0, 3) == 0);
      d.rs1_is_x0 = (k == 1 || k == 2); d.rd_is_x0 = (k == 2); d.scalar = 64'(avl); d.vl = vl_t'(cur);
      if (d.new_vtype.vill) exp_vl = 0;
      else if (!d.rs1_is_x0) exp_vl = (avl < vmax) ? avl : vmax;
      else if (!d.rd_is_x0) exp_vl = vmax;
      else exp_vl = (cur < vmax) ? cur : vmax;
      check(r && !stall, "ready before");
      v = 1; @(negedge clk); v = 0;
      check(!r && stall && req, "write-back requested, stalled");
      check(o.result == 64'(exp_vl) && o.csr.vl == vl_t'(exp_vl) && o.csr.vl_we && o.csr.vtype_we
            && o.csr.vtype == d.new_vtype && o.csr.vstart_clr && o.trans_id == d.trans_id && !o.ex.valid,
            $sformatf("vl %0d expected %0d", o.result, exp_vl));
      repeat ($urandom_range(0, 2)) @(negedge clk);
      check(req2 && !r2 && o2 == o, "write-back-only variant: same request");
      gnt = 1; @(negedge clk); gnt = 0;
      check(!req && !r, "after write back: still stalled");
      check(!req2 && r2 && !stall2, "write-back-only variant: released at write back");
      repeat ($urandom_range(0, 3)) begin @(negedge clk); check(!r, "stalled until commit"); end
      cack = 1; ctid = d.trans_id + 1'b1; @(negedge clk); check(!r, "other trans_id does not release");
      ctid = d.trans_id; @(negedge clk); cack = 0;
      check(r && !stall, "released by its commit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
