// tb_sequencer: directed routing checks. An arithmetic instruction becomes
// micro-ops at the right unit, an illegal one an exception write-back, a
// vsetvli a configuration write-back followed by a stall of the whole
// sequencer (ready low) until its commit.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_sequencer;
  import vu_pkg::*;
  import vtb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic iv, r, cack, cst, hz; logic [31:0] instr; logic [63:0] a, b; trans_id_t tid, ctid;
  vtype_t vt; vl_t vl;
  logic uv [NR_FUS]; logic ur [NR_FUS]; uop_t uo [NR_FUS]; logic ret [NR_FUS]; uop_t ret_u [NR_FUS];
  logic wreq [2]; wb_req_t wd [2]; logic wg [2];
  sequencer dut (.clk_i(clk), .rst_ni(rst_n), .issue_valid_i(iv), .ready_o(r), .instr_i(instr),
    .scalar_a_i(a), .scalar_b_i(b), .trans_id_i(tid), .vtype_i(vt), .vl_i(vl),
    .commit_trans_id_i(ctid), .commit_ack_i(cack), .uop_valid_o(uv), .uop_ready_i(ur), .uop_o(uo),
    .retire_i(ret), .retire_uop_i(ret_u), .vwb_req_o(wreq), .vwb_data_o(wd), .vwb_gnt_i(wg),
    .cfg_stall_o(cst), .hazard_o(hz));

  task automatic issue(input logic [31:0] x, input trans_id_t t);
    instr = x; tid = t; iv = 1;
    #1; while (!r) begin @(negedge clk); #1; end
    @(negedge clk); iv = 0;
  endtask

  initial begin
    iv = 0; instr = 0; a = 64'd40; b = 0; tid = 0; ctid = 0; cack = 0;
    vt = '0; vt.vsew = SEW32; vl = 8'd8;
    foreach (ur[i]) begin ur[i] = 0; ret[i] = 0; ret_u[i] = '0; wg[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    // vadd.vv v4, v8, v12 with vl=8, SEW=32: two micro-ops at the ALU
    issue(enc_op(6'b000000, 1'b1, 8, 12, 3'b000, 4), 3'd1);
    check(!r, "busy while dispatching");
    check(uv[0] && !uv[1] && uo[0].vd == 4 && uo[0].vs2 == 8 && uo[0].vs1 == 12 && !uo[0].last && uo[0].be == '1, "first micro-op");
    ur[0] = 1; @(negedge clk);
    check(uv[0] && uo[0].vd == 5 && uo[0].vs2 == 9 && uo[0].last && uo[0].trans_id == 1, "second micro-op");
    @(negedge clk); ur[0] = 0;
    check(!uv[0] && r, "done and ready");
    // vmul.vx v4, v8, x: one register-group at the multiplier, waits for the ALU's v4 write (WAW)
    ur[0] = 0;
    issue(enc_op(6'b100101, 1'b1, 8, 1, 3'b110, 4), 3'd2);
    check(hz && !uv[1], "held by the ALU writing v4");
    ret_u[0] = '0; ret_u[0].vd = 4; ret_u[0].vs2 = 8; ret_u[0].vs1 = 12; ret_u[0].use_vs1 = 1; ret_u[0].use_vs2 = 1; ret_u[0].writes_vd = 1;
    ret[0] = 1; @(negedge clk);
    ret_u[0].vd = 5; ret_u[0].vs2 = 9; ret_u[0].vs1 = 13; @(negedge clk); ret[0] = 0;
    check(!hz && uv[1] && uo[1].op == VMUL && uo[1].scalar == 64'd40, "released after the ALU retired");
    ur[1] = 1; @(negedge clk); @(negedge clk); ur[1] = 0;
    check(r, "ready after the multiplier took both micro-ops");
    // illegal: masked form
    issue(enc_op(6'b000000, 1'b0, 8, 12, 3'b000, 4), 3'd3);
    check(wreq[1] && !wreq[0] && wd[1].ex.valid && wd[1].ex.cause == 2 && wd[1].trans_id == 3 && !r, "exception reported");
    wg[1] = 1; @(negedge clk); wg[1] = 0;
    check(!wreq[1] && r, "exception done");
    // vsetvli x3, x5 (AVL 40), e8 m1: vl = 16
    issue(enc_vsetvli(3, 5, 11'b000_0000_0000), 3'd4);
    check(wreq[0] && wd[0].result == 64'd16 && wd[0].csr.vl == 16 && wd[0].csr.vl_we && !r && cst, "vsetvli reported");
    wg[0] = 1; @(negedge clk); wg[0] = 0;
    repeat (3) begin check(!r, "stalled until commit"); @(negedge clk); end
    ctid = 4; cack = 1; @(negedge clk); cack = 0;
    check(r && !cst, "released by its commit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
