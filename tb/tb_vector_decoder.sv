// tb_vector_decoder: directed decodes of every supported instruction form,
// the immediate and scalar operands, vsetvli/vsetvl vtype decoding, and the
// illegal cases (wrong opcode, unknown funct6, forbidden forms, masked
// forms, any non-configuration instruction while vtype.vill is set).
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_vector_decoder;
  import vu_pkg::*;
  import vtb_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic [31:0] instr; logic [63:0] a, b; trans_id_t tid; vtype_t vt; vl_t vl; decoded_t d;
  vector_decoder dut (.instr_i(instr), .scalar_a_i(a), .scalar_b_i(b), .trans_id_i(tid), .vtype_i(vt), .vl_i(vl), .dec_o(d));
  vop_e iops [14] = '{VADD, VSUB, VRSUB, VAND, VOR, VXOR, VSLL, VSRL, VSRA, VMINU, VMIN, VMAXU, VMAX, VMV};
  initial begin
    a = 64'h1234; b = 64'h0000_0000_0000_000E; tid = 3'd5; vl = 8'd17;
    vt = '0; vt.vsew = SEW32; vt.vlmul = 2'd1;
    // integer ops in all three forms
    foreach (iops[i]) for (int k = 0; k < 3; k++) begin
      logic [2:0] f3; logic exp_ill;
      f3 = (k == 0) ? 3'b000 : (k == 1) ? 3'b100 : 3'b011;
      exp_ill = (k == 2 && iops[i] inside {VSUB, VMINU, VMIN, VMAXU, VMAX}) || (k == 0 && iops[i] == VRSUB);
      instr = enc_op(op_funct6(iops[i]), 1'b1, (iops[i] == VMV) ? 0 : 4, 6, f3, 2); #1;
      check(d.illegal == exp_ill, $sformatf("legality of %s form %0d", iops[i].name(), k));
      if (!exp_ill) begin
        check(d.op == iops[i] && d.fu == FU_ALU && d.vd == 2 && d.vs2 == ((iops[i] == VMV) ? 0 : 4) && d.vs1 == 6 && d.writes_vd, "fields");
        check(d.src == ((k == 0) ? SRC_VV : (k == 1) ? SRC_VX : SRC_VI), "operand form");
        check(d.scalar == ((k == 2) ? 64'd6 : a), "scalar operand");
        check(d.sew == SEW32 && d.lmul == 2'd1 && d.vl == vl && d.trans_id == tid && d.instr == instr, "context");
      end
    end
    instr = enc_op(6'b000000, 1'b1, 1, 5'b11101, 3'b011, 2); #1;
    check(d.scalar == 64'hFFFF_FFFF_FFFF_FFFD, "negative immediate sign-extended");
    // multiplier and vmv.x.s
    instr = enc_op(6'b100101, 1'b1, 4, 6, 3'b010, 2); #1; check(!d.illegal && d.op == VMUL && d.fu == FU_MUL && d.src == SRC_VV, "vmul.vv");
    instr = enc_op(6'b100111, 1'b1, 4, 6, 3'b110, 2); #1; check(!d.illegal && d.op == VMULH && d.src == SRC_VX, "vmulh.vx");
    instr = enc_op(6'b100100, 1'b1, 4, 6, 3'b010, 2); #1; check(!d.illegal && d.op == VMULHU, "vmulhu.vv");
    instr = enc_op(6'b010000, 1'b1, 4, 0, 3'b010, 9); #1;
    check(!d.illegal && d.op == VMVXS && d.fu == FU_ALU && d.writes_scalar && !d.writes_vd, "vmv.x.s");
    instr = enc_op(6'b010000, 1'b1, 4, 1, 3'b010, 9); #1; check(d.illegal, "VWXUNARY0 other than vmv.x.s");
    // configuration
    instr = enc_vsetvli(3, 0, 11'b000_0000_1110); #1;
    check(!d.illegal && d.is_cfg && d.op == VSETVLI && d.rs1_is_x0 && !d.rd_is_x0, "vsetvli");
    check(!d.new_vtype.vill && d.new_vtype.vsew == SEW64 && d.new_vtype.vlmul == 2'd2, "vsetvli vtype");
    instr = enc_vsetvli(3, 2, 11'b000_0001_0000); #1; check(d.new_vtype.vill, "SEW 128 gives vill");
    instr = enc_vsetvli(3, 2, 11'b000_0010_0000); #1; check(d.new_vtype.vill, "fractional LMUL gives vill");
    instr = enc_vsetvl(3, 2, 7); #1;
    check(!d.illegal && d.op == VSETVL && d.new_vtype.vsew == SEW64 && d.new_vtype.vlmul == 2'd2, "vsetvl takes vtype from rs2");
    instr = {7'b1100000, 5'd1, 5'd2, 3'b111, 5'd3, 7'b1010111}; #1; check(d.illegal, "reserved OPCFG encoding");
    // illegal
    instr = enc_op(6'b001001, 1'b0, 4, 6, 3'b000, 2); #1; check(d.illegal, "masked form");
    instr = enc_op(6'b111111, 1'b1, 4, 6, 3'b000, 2); #1; check(d.illegal, "unknown funct6");
    instr = enc_op(6'b000000, 1'b1, 4, 6, 3'b001, 2); #1; check(d.illegal, "floating point");
    instr = 32'h0000_0033; #1; check(d.illegal, "not OP-V");
    vt.vill = 1;
    instr = enc_op(6'b000000, 1'b1, 4, 6, 3'b000, 2); #1; check(d.illegal, "vill blocks arithmetic");
    instr = enc_vsetvli(3, 2, 11'b000_0000_0000); #1; check(!d.illegal, "vill does not block vsetvli");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
