// vector_decoder: full decoding of a raw vector instruction (OP-V opcode).
//
// Combinational. Extracts the operation, the operand form (.vv, .vx, .vi),
// the vector register fields, the functional unit, the scalar operand
// (rs1 value or sign-extended 5-bit immediate) and the new vtype of
// vsetvli/vsetvl, and attaches the current SEW, LMUL and vl from the vector
// CSRs. Anything not supported is flagged illegal: opcodes other than OP-V,
// unknown funct6/funct3 combinations, masked forms (vm = 0), and any
// non-configuration instruction while vtype.vill is set.
// Supported: vadd, vsub, vrsub, vand, vor, vxor, vsll, vsrl, vsra, vminu,
// vmin, vmaxu, vmax, vmv.v.{v,x,i}, vmv.x.s (ALU); vmul, vmulh, vmulhu
// (multiplier); vsetvli, vsetvl. Encodings are those of the RISC-V V draft
// v0.9; the subset is this design's choice.
//
// Lint reports vtype bits as unused: the decoder needs SEW, LMUL and vill,
// not the tail/mask agnostic flags.
//
// Full decoding in the sequencer follows the source; the legality rules
// for masked forms and vill are this design's.
module vector_decoder
  import vu_pkg::*;
(
  input  logic [31:0]     instr_i,
  input  logic [XLEN-1:0] scalar_a_i,
  input  logic [XLEN-1:0] scalar_b_i,
  input  trans_id_t       trans_id_i,
  input  vtype_t          vtype_i,
  input  vl_t             vl_i,
  output decoded_t        dec_o
);

  localparam logic [6:0] OPC_OPV = 7'b1010111;

  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [5:0] funct6;
  logic       vm;

  assign opcode = instr_i[6:0];
  assign funct3 = instr_i[14:12];
  assign funct6 = instr_i[31:26];
  assign vm     = instr_i[25];

  always_comb begin
    dec_o               = '0;
    dec_o.illegal       = 1'b1;
    dec_o.fu            = FU_ALU;
    dec_o.op            = VADD;
    dec_o.vd            = instr_i[11:7];
    dec_o.vs1           = instr_i[19:15];
    dec_o.vs2           = instr_i[24:20];
    dec_o.rs1_is_x0     = instr_i[19:15] == 5'd0;
    dec_o.rd_is_x0      = instr_i[11:7] == 5'd0;
    dec_o.writes_vd     = 1'b1;
    dec_o.scalar        = scalar_a_i;
    dec_o.scalar_b      = scalar_b_i;
    dec_o.sew           = vtype_i.vsew;
    dec_o.lmul          = vtype_i.vlmul;
    dec_o.vl            = vl_i;
    dec_o.trans_id      = trans_id_i;
    dec_o.instr         = instr_i;
    dec_o.new_vtype     = vtype_from_raw(XLEN'(instr_i[30:20]));

    if (opcode == OPC_OPV) begin
      unique case (funct3)
        3'b111: begin // OPCFG
          dec_o.is_cfg    = 1'b1;
          dec_o.writes_vd = 1'b0;
          if (!instr_i[31]) begin
            dec_o.op      = VSETVLI;
            dec_o.illegal = 1'b0;
          end else if (instr_i[31:25] == 7'b1000000) begin
            dec_o.op        = VSETVL;
            dec_o.new_vtype = vtype_from_raw(scalar_b_i);
            dec_o.illegal   = 1'b0;
          end
        end
        3'b000, 3'b100, 3'b011: begin // OPIVV, OPIVX, OPIVI
          dec_o.src    = (funct3 == 3'b000) ? SRC_VV : (funct3 == 3'b100) ? SRC_VX : SRC_VI;
          if (funct3 == 3'b011) dec_o.scalar = XLEN'($signed(instr_i[19:15]));
          dec_o.illegal = 1'b0;
          unique case (funct6)
            6'b000000: dec_o.op = VADD;
            6'b000010: begin dec_o.op = VSUB;  dec_o.illegal = funct3 == 3'b011; end
            6'b000011: begin dec_o.op = VRSUB; dec_o.illegal = funct3 == 3'b000; end
            6'b000100: begin dec_o.op = VMINU; dec_o.illegal = funct3 == 3'b011; end
            6'b000101: begin dec_o.op = VMIN;  dec_o.illegal = funct3 == 3'b011; end
            6'b000110: begin dec_o.op = VMAXU; dec_o.illegal = funct3 == 3'b011; end
            6'b000111: begin dec_o.op = VMAX;  dec_o.illegal = funct3 == 3'b011; end
            6'b001001: dec_o.op = VAND;
            6'b001010: dec_o.op = VOR;
            6'b001011: dec_o.op = VXOR;
            6'b100101: dec_o.op = VSLL;
            6'b101000: dec_o.op = VSRL;
            6'b101001: dec_o.op = VSRA;
            6'b010111: begin dec_o.op = VMV; dec_o.illegal = instr_i[24:20] != 5'd0; end
            default:   dec_o.illegal = 1'b1;
          endcase
        end
        3'b010, 3'b110: begin // OPMVV, OPMVX
          dec_o.src     = (funct3 == 3'b010) ? SRC_VV : SRC_VX;
          dec_o.fu      = FU_MUL;
          dec_o.illegal = 1'b0;
          unique case (funct6)
            6'b100101: dec_o.op = VMUL;
            6'b100111: dec_o.op = VMULH;
            6'b100100: dec_o.op = VMULHU;
            6'b010000: begin // VWXUNARY0: vmv.x.s
              dec_o.op            = VMVXS;
              dec_o.fu            = FU_ALU;
              dec_o.writes_vd     = 1'b0;
              dec_o.writes_scalar = 1'b1;
              dec_o.illegal       = (funct3 != 3'b010) || (instr_i[19:15] != 5'd0);
            end
            default:   dec_o.illegal = 1'b1;
          endcase
        end
        default: dec_o.illegal = 1'b1;
      endcase
      // masking is not supported, and vill blocks everything but vset{i}vl
      if (!dec_o.is_cfg && (!vm || vtype_i.vill)) dec_o.illegal = 1'b1;
    end
  end

endmodule
