// tb_vector_predecoder: checks which instructions are claimed as vector
// instructions and which register file each scalar operand is read from or
// written to; non-vector instructions pass the scalar decoder's entry.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_vector_predecoder;
  import vu_pkg::*;
  import vtb_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  logic [31:0] instr; issue_entry_t se, e; logic isv;
  vector_predecoder dut (.instr_i(instr), .scalar_entry_i(se), .is_vector_o(isv), .entry_o(e));
  initial begin
    se = '0; se.rs1 = 5'd31; se.instr = 32'hDEAD_BEEF;
    instr = enc_op(6'b000000, 1'b1, 2, 5, 3'b000, 1); #1;
    check(isv && e.is_vector && !e.is_vcfg && e.rs1_rf == RF_NONE && e.rd_rf == RF_NONE && e.instr == instr, "vadd.vv");
    instr = enc_op(6'b000000, 1'b1, 2, 5, 3'b100, 1); #1;
    check(isv && e.rs1_rf == RF_GPR && e.rs1 == 5 && e.rd_rf == RF_NONE, "vadd.vx reads x5");
    instr = enc_op(6'b000000, 1'b1, 2, 5, 3'b011, 1); #1;
    check(isv && e.rs1_rf == RF_NONE, "vadd.vi reads no scalar");
    instr = enc_op(6'b000000, 1'b1, 2, 5, 3'b101, 1); #1;
    check(isv && e.rs1_rf == RF_FPR, "vfadd.vf reads f5");
    instr = enc_op(6'b100101, 1'b1, 2, 5, 3'b110, 1); #1;
    check(isv && e.rs1_rf == RF_GPR, "vmul.vx reads x5");
    instr = enc_op(6'b010000, 1'b1, 2, 0, 3'b010, 6); #1;
    check(isv && e.rd_rf == RF_GPR && e.rd == 6, "vmv.x.s writes x6");
    instr = enc_op(6'b010000, 1'b1, 2, 0, 3'b001, 6); #1;
    check(isv && e.rd_rf == RF_FPR, "vfmv.f.s writes f6");
    instr = enc_vsetvli(3, 4, 11'd8); #1;
    check(isv && e.is_vcfg && e.rs1_rf == RF_GPR && e.rd_rf == RF_GPR && e.rs2_rf == RF_NONE, "vsetvli");
    instr = enc_vsetvl(3, 4, 5); #1;
    check(isv && e.is_vcfg && e.rs2_rf == RF_GPR && e.rs2 == 5, "vsetvl reads x5 as rs2");
    instr = {3'b000, 3'b000, 1'b1, 5'd0, 5'd10, 3'b110, 5'd4, 7'b0000111}; #1;
    check(isv && e.rs1_rf == RF_GPR && e.rs2_rf == RF_NONE, "unit-stride vector load");
    instr = {3'b000, 3'b010, 1'b1, 5'd11, 5'd10, 3'b110, 5'd4, 7'b0100111}; #1;
    check(isv && e.rs1_rf == RF_GPR && e.rs2_rf == RF_GPR, "strided vector store");
    instr = {12'd0, 5'd10, 3'b010, 5'd4, 7'b0000111}; #1;
    check(!isv && e == se, "flw is scalar");
    instr = {12'd0, 5'd10, 3'b011, 5'd4, 7'b0100111}; #1;
    check(!isv && e == se, "fsd is scalar");
    instr = 32'h0000_0033; #1;
    check(!isv && e == se, "add is scalar");
    for (int i = 0; i < 2000; i++) begin
      instr = $urandom; #1;
      check(isv == (instr[6:0] == 7'b1010111 || ((instr[6:0] == 7'b0000111 || instr[6:0] == 7'b0100111)
                    && instr[14:12] inside {3'b000, 3'b101, 3'b110, 3'b111})), "vector claim rule");
      check(isv ? (e.instr == instr && e.rs1 == instr[19:15] && e.rd == instr[11:7]) : (e == se), "entry");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
