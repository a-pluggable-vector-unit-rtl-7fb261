// tb_simd_alu: random operands for every ALU operation and SEW, in vector
// and scalar forms, against the reference element model; also vmv.x.s and
// the pass-through handshake.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_simd_alu;
  import vu_pkg::*;
  import vtb_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  logic iv, ir, ov, ordy, us; vop_e op; vsew_e sew; logic [63:0] sc, sres;
  vreg_data_t a, b, res; exception_t ex;
  simd_alu dut (.in_valid_i(iv), .in_ready_o(ir), .op_i(op), .sew_i(sew), .use_scalar_i(us),
    .scalar_i(sc), .vs1_i(a), .vs2_i(b), .out_valid_o(ov), .out_ready_i(ordy), .result_o(res),
    .scalar_result_o(sres), .exception_o(ex));
  vop_e ops [14] = '{VADD, VSUB, VRSUB, VAND, VOR, VXOR, VSLL, VSRL, VSRA, VMINU, VMIN, VMAXU, VMAX, VMV};
  initial begin
    for (int i = 0; i < 2000; i++) begin
      int w; logic ok;
      op = ops[$urandom_range(0, 13)]; sew = vsew_e'($urandom_range(0, 3)); w = 8 << sew;
      us = $urandom_range(0, 1); sc = {$urandom, $urandom};
      a = {$urandom, $urandom, $urandom, $urandom}; b = {$urandom, $urandom, $urandom, $urandom};
      iv = $urandom_range(0, 1); ordy = $urandom_range(0, 1);
      #1;
      ok = 1;
      for (int e = 0; e < VLEN / w; e++) begin
        logic [63:0] ea, eb, got;
        ea  = us ? sc : zx(64'(a >> (e * w)), w);
        eb  = zx(64'(b >> (e * w)), w);
        got = zx(64'(res >> (e * w)), w);
        if (got != ref_elem(op, ea, eb, w)) ok = 0;
      end
      check(ok, $sformatf("op %s sew %0d", op.name(), w));
      check(ov == iv && ir == ordy && !ex.valid, "handshake");
      check(sres == sx(64'(b), w), "vmv.x.s element 0");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
