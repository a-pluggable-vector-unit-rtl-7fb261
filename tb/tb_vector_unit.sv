// tb_vector_unit: a short directed program through the vector unit (without
// the CSR file, whose vtype/vl the testbench drives). Data flows through
// dependent instructions on both units and is read back with vmv.x.s; each
// instruction must produce exactly one write-back with the right trans_id,
// result and exception.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_vector_unit;
  import vu_pkg::*;
  import vtb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic iv, r, cack, cst, hz; logic [31:0] instr; logic [63:0] a, b; trans_id_t tid, ctid;
  vtype_t vt; vl_t vl; logic wv [1]; wb_req_t wd [1];
  vector_unit dut (.clk_i(clk), .rst_ni(rst_n), .issue_valid_i(iv), .ready_o(r), .instr_i(instr),
    .scalar_a_i(a), .scalar_b_i(b), .trans_id_i(tid), .vtype_i(vt), .vl_i(vl),
    .commit_trans_id_i(ctid), .commit_ack_i(cack), .wb_valid_o(wv), .wb_data_o(wd),
    .cfg_stall_o(cst), .hazard_o(hz));

  typedef struct { logic [31:0] instr; logic [63:0] a; logic [63:0] res; logic chk_res; logic exc; } step_t;
  step_t prog [$];
  int seen [8];
  wb_req_t got [8];
  int n_wb = 0;

  always @(posedge clk) if (rst_n && wv[0]) begin
    seen[wd[0].trans_id]++; got[wd[0].trans_id] = wd[0]; n_wb++;
  end

  task automatic run(input step_t s, input trans_id_t t);
    seen[t] = 0;
    instr = s.instr; a = s.a; tid = t; iv = 1;
    #1; while (!r) begin @(negedge clk); #1; end
    @(negedge clk); iv = 0;
    while (seen[t] == 0) @(negedge clk);
    @(negedge clk);
    check(seen[t] == 1, $sformatf("one write-back for %0d", t));
    check(got[t].ex.valid == s.exc, $sformatf("exception flag for %0d", t));
    if (s.exc) check(got[t].ex.cause == 2 && got[t].ex.tval == 64'(s.instr), "exception payload");
    if (s.chk_res) check(got[t].result == s.res, $sformatf("result of %0d: %h expected %h", t, got[t].result, s.res));
  endtask

  function automatic step_t st(logic [31:0] i, logic [63:0] a = 0, logic [63:0] res = 0, logic c = 0, logic e = 0);
    step_t s; s.instr = i; s.a = a; s.res = res; s.chk_res = c; s.exc = e; return s;
  endfunction

  initial begin
    iv = 0; instr = 0; a = 0; b = 0; tid = 0; ctid = 0; cack = 0;
    vt = '0; vt.vsew = SEW32; vl = 8'd4;
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    // vsetvli x3, x0, e32 m1: vl = VLMAX = 4, then stall until committed
    instr = enc_vsetvli(3, 0, 11'b000_0000_1000); tid = 0; iv = 1; @(negedge clk); iv = 0;
    while (seen[0] == 0) @(negedge clk);
    check(got[0].result == 64'd4 && got[0].csr.vl_we && got[0].csr.vtype_we && got[0].csr.vtype.vsew == SEW32, "vsetvli");
    check(cst && !r, "stalled behind vsetvli");
    ctid = 0; cack = 1; @(negedge clk); cack = 0;
    check(!cst && r, "released");
    prog.push_back(st(enc_op(6'b010111, 1'b1, 0, 7, 3'b011, 1)));                     // vmv.v.i v1, 7
    prog.push_back(st(enc_op(6'b000000, 1'b1, 1, 3, 3'b011, 2)));                     // vadd.vi v2, v1, 3
    prog.push_back(st(enc_op(6'b100101, 1'b1, 2, 2, 3'b010, 3)));                     // vmul.vv v3, v2, v2
    prog.push_back(st(enc_op(6'b010000, 1'b1, 3, 0, 3'b010, 9), 0, 64'd100, 1));      // vmv.x.s x9, v3
    prog.push_back(st(enc_op(6'b000010, 1'b1, 3, 1, 3'b000, 4)));                     // vsub.vv v4, v3, v1
    prog.push_back(st(enc_op(6'b010000, 1'b1, 4, 0, 3'b010, 9), 0, 64'd93, 1));       // vmv.x.s x9, v4
    prog.push_back(st(enc_op(6'b000011, 1'b1, 1, 0, 3'b011, 5)));                     // vrsub.vi v5, v1, 0
    prog.push_back(st(enc_op(6'b010000, 1'b1, 5, 0, 3'b010, 9), 0, 64'hFFFF_FFFF_FFFF_FFF9, 1)); // -7
    prog.push_back(st(enc_op(6'b000000, 1'b0, 1, 2, 3'b000, 6), 0, 0, 0, 1));         // masked: illegal
    prog.push_back(st(enc_op(6'b100111, 1'b1, 5, 1, 3'b110, 6), 64'h4000_0000));      // vmulh.vx v6, v5, 2^30
    prog.push_back(st(enc_op(6'b010000, 1'b1, 6, 0, 3'b010, 9), 0, 64'hFFFF_FFFF_FFFF_FFFE, 1)); // (-7*2^30)>>32 = -2
    foreach (prog[i]) run(prog[i], trans_id_t'(i + 1));
    check(n_wb == prog.size() + 1, "no extra write-backs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
