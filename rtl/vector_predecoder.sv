// vector_predecoder: vector pre-decoder beside the core's scalar decoder.
//
// The core keeps decoding scalar instructions itself; this block recognises
// vector instructions (OP-V, and the vector loads/stores under the LOAD-FP
// and STORE-FP opcodes) and tells the issue logic which scalar register file
// each operand comes from, so that dependencies between vector instructions
// and the gp/fp registers are tracked while vector registers are not
// renamed or tracked by the core at all. A mux then picks its entry or the
// scalar decoder's. Combinational.
// Operand classes (RISC-V V draft v0.9): .vx forms and vset{i}vl read rs1
// from the gp file, .vf forms from the fp file; vsetvl also reads rs2;
// vset{i}vl and vmv.x.s (VWXUNARY0) write a gp rd, vfmv.f.s (VWFUNARY0) an fp
// rd; loads/stores read a gp base and, when strided, a gp stride. The block
// and its mux follow the source; the classification is this design's.
module vector_predecoder
  import vu_pkg::*;
(
  input  logic [31:0]  instr_i,
  input  issue_entry_t scalar_entry_i,
  output logic         is_vector_o,
  output issue_entry_t entry_o
);

  localparam logic [6:0] OPC_OPV     = 7'b1010111;
  localparam logic [6:0] OPC_LOAD_FP = 7'b0000111;
  localparam logic [6:0] OPC_STOREFP = 7'b0100111;

  logic [6:0]   opcode;
  logic [2:0]   funct3;
  logic [5:0]   funct6;
  logic         vec_mem;
  issue_entry_t ve;

  assign opcode  = instr_i[6:0];
  assign funct3  = instr_i[14:12];
  assign funct6  = instr_i[31:26];
  // vector widths of LOAD-FP/STORE-FP: 000, 101, 110, 111
  assign vec_mem = (opcode == OPC_LOAD_FP || opcode == OPC_STOREFP)
                && (funct3 == 3'b000 || funct3[2:1] == 2'b11 || funct3 == 3'b101);

  always_comb begin
    ve           = '0;
    ve.rs1       = instr_i[19:15];
    ve.rs2       = instr_i[24:20];
    ve.rd        = instr_i[11:7];
    ve.instr     = instr_i;
    ve.is_vector = (opcode == OPC_OPV) || vec_mem;
    if (opcode == OPC_OPV) begin
      unique case (funct3)
        3'b100, 3'b110: ve.rs1_rf = RF_GPR;               // OPIVX, OPMVX
        3'b101:         ve.rs1_rf = RF_FPR;               // OPFVF
        3'b010:         if (funct6 == 6'b010000) ve.rd_rf = RF_GPR; // vmv.x.s
        3'b001:         if (funct6 == 6'b010000) ve.rd_rf = RF_FPR; // vfmv.f.s
        3'b111: begin                                     // vsetvli, vsetvl
          ve.is_vcfg = 1'b1;
          ve.rs1_rf  = RF_GPR;
          ve.rd_rf   = RF_GPR;
          if (instr_i[31]) ve.rs2_rf = RF_GPR;
        end
        default: ;
      endcase
    end else if (vec_mem) begin
      ve.rs1_rf = RF_GPR;
      if (instr_i[27:26] == 2'b10) ve.rs2_rf = RF_GPR;   // strided
    end
  end

  assign is_vector_o = ve.is_vector;
  assign entry_o     = ve.is_vector ? ve : scalar_entry_i;

endmodule
