// vtb_pkg: reference model helpers shared by the vector unit testbenches.
//
// Instruction encoders for the RISC-V V draft v0.9 and a per-element
// reference of the integer operations, written independently of the RTL
// (explicit sign/zero extension per element width).
//
// The models follow the V extension's definition of each operation; the
// helpers themselves are this testbench's own.
package vtb_pkg;
  import vu_pkg::*;

  localparam logic [6:0] OPV = 7'b1010111;

  function automatic logic [31:0] enc_op(input logic [5:0] funct6, input logic vm,
                                         input int vs2, input int vs1, input logic [2:0] funct3,
                                         input int vd);
    return {funct6, vm, 5'(vs2), 5'(vs1), funct3, 5'(vd), OPV};
  endfunction

  // vsetvli rd, rs1, e<8<<sew>, m<1<<lmul>
  function automatic logic [31:0] enc_vsetvli(input int rd, input int rs1, input logic [10:0] zimm);
    return {1'b0, zimm, 5'(rs1), 3'b111, 5'(rd), OPV};
  endfunction

  function automatic logic [31:0] enc_vsetvl(input int rd, input int rs1, input int rs2);
    return {7'b1000000, 5'(rs2), 5'(rs1), 3'b111, 5'(rd), OPV};
  endfunction

  function automatic logic [63:0] zx(input logic [63:0] v, input int w);
    case (w)
      8:       return {56'd0, v[7:0]};
      16:      return {48'd0, v[15:0]};
      32:      return {32'd0, v[31:0]};
      default: return v;
    endcase
  endfunction

  function automatic logic [63:0] sx(input logic [63:0] v, input int w);
    case (w)
      8:       return {{56{v[7]}}, v[7:0]};
      16:      return {{48{v[15]}}, v[15:0]};
      32:      return {{32{v[31]}}, v[31:0]};
      default: return v;
    endcase
  endfunction

  // b is the vs2 element, a the vs1 element or scalar
  function automatic logic [63:0] ref_elem(input vop_e op, input logic [63:0] a,
                                           input logic [63:0] b, input int w);
    logic signed [127:0] sp;
    logic [127:0]        up;
    int                  sh;
    sh = int'(a % 64'(w));
    case (op)
      VADD:   return zx(a + b, w);
      VSUB:   return zx(b - a, w);
      VRSUB:  return zx(a - b, w);
      VAND:   return zx(a & b, w);
      VOR:    return zx(a | b, w);
      VXOR:   return zx(a ^ b, w);
      VSLL:   return zx(b << sh, w);
      VSRL:   return zx(zx(b, w) >> sh, w);
      VSRA:   return zx($signed(sx(b, w)) >>> sh, w);
      VMINU:  return (zx(b, w) < zx(a, w)) ? zx(b, w) : zx(a, w);
      VMAXU:  return (zx(b, w) > zx(a, w)) ? zx(b, w) : zx(a, w);
      VMIN:   return ($signed(sx(b, w)) < $signed(sx(a, w))) ? zx(b, w) : zx(a, w);
      VMAX:   return ($signed(sx(b, w)) > $signed(sx(a, w))) ? zx(b, w) : zx(a, w);
      VMV:    return zx(a, w);
      VMUL:   begin sp = $signed(sx(a, w)) * $signed(sx(b, w)); return zx(sp[63:0], w); end
      VMULH:  begin sp = $signed(sx(a, w)) * $signed(sx(b, w)); return zx(64'(sp >>> w), w); end
      VMULHU: begin up = {64'd0, zx(a, w)} * {64'd0, zx(b, w)}; return zx(64'(up >> w), w); end
      default: return 64'd0;
    endcase
  endfunction

  // encoding of each operation: funct6, allowed forms
  function automatic logic [5:0] op_funct6(input vop_e op);
    case (op)
      VADD: return 6'b000000;  VSUB: return 6'b000010;  VRSUB: return 6'b000011;
      VMINU: return 6'b000100; VMIN: return 6'b000101;  VMAXU: return 6'b000110;
      VMAX: return 6'b000111;  VAND: return 6'b001001;  VOR: return 6'b001010;
      VXOR: return 6'b001011;  VSLL: return 6'b100101;  VSRL: return 6'b101000;
      VSRA: return 6'b101001;  VMV: return 6'b010111;   VMUL: return 6'b100101;
      VMULH: return 6'b100111; VMULHU: return 6'b100100; VMVXS: return 6'b010000;
      default: return 6'b111111;
    endcase
  endfunction

endpackage
