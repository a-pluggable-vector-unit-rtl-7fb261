// simd_alu: packed-SIMD integer ALU, the execute part of the ALU unit.
//
// Works on one vector register's worth of elements (VLEN bits) at the
// selected element width SEW (8, 16, 32 or 64 bits). Operand a is vs1, or
// the scalar operand (rs1 or immediate) replicated into every element when
// use_scalar is set; operand b is vs2. Results follow the RISC-V V
// semantics: vsub = b - a, vrsub = a - b, shifts shift b by the low
// log2(SEW) bits of a, vmv copies a, vmin/vmax compare b with a.
// vmv.x.s returns element 0 of vs2, sign-extended, as the scalar result.
// Fully combinational: out_valid = in_valid and in_ready = out_ready.
// The port list is the functional-unit interface the source asks for
// (SIMD and scalar operands, SEW, ready/valid in and out, SIMD and scalar
// result, exception); the instruction set is this design's choice.
module simd_alu
  import vu_pkg::*;
(
  input  logic            in_valid_i,
  output logic            in_ready_o,
  input  vop_e            op_i,
  input  vsew_e           sew_i,
  input  logic            use_scalar_i,
  input  logic [XLEN-1:0] scalar_i,
  input  vreg_data_t      vs1_i,
  input  vreg_data_t      vs2_i,
  output logic            out_valid_o,
  input  logic            out_ready_i,
  output vreg_data_t      result_o,
  output logic [XLEN-1:0] scalar_result_o,
  output exception_t      exception_o
);

  assign out_valid_o = in_valid_i;
  assign in_ready_o  = out_ready_i;
  assign exception_o = '0;

  // one element, w bits wide, held in the low bits of 64-bit values
  function automatic logic [63:0] elem(input vop_e op, input logic [63:0] a,
                                       input logic [63:0] b, input int w);
    logic [63:0]        mask, r;
    logic signed [63:0] sa, sb;
    logic [5:0]         sh;
    mask = (w == 64) ? '1 : ((64'd1 << w) - 1);
    sa   = $signed(a << (64 - w)) >>> (64 - w);
    sb   = $signed(b << (64 - w)) >>> (64 - w);
    sh   = 6'(a & 64'(w - 1));
    unique case (op)
      VADD:    r = b + a;
      VSUB:    r = b - a;
      VRSUB:   r = a - b;
      VAND:    r = b & a;
      VOR:     r = b | a;
      VXOR:    r = b ^ a;
      VSLL:    r = b << sh;
      VSRL:    r = (b & mask) >> sh;
      VSRA:    r = 64'(sb >>> sh);
      VMINU:   r = ((b & mask) < (a & mask)) ? b : a;
      VMIN:    r = (sb < sa) ? b : a;
      VMAXU:   r = ((b & mask) > (a & mask)) ? b : a;
      VMAX:    r = (sb > sa) ? b : a;
      VMV:     r = a;
      default: r = b;
    endcase
    return r & mask;
  endfunction

  always_comb begin
    result_o = '0;
    unique case (sew_i)
      SEW8:  for (int i = 0; i < VLEN / 8; i++)
               result_o[8*i +: 8] = 8'(elem(op_i, use_scalar_i ? scalar_i : 64'(vs1_i[8*i +: 8]),
                                                64'(vs2_i[8*i +: 8]), 8));
      SEW16: for (int i = 0; i < VLEN / 16; i++)
               result_o[16*i +: 16] = 16'(elem(op_i, use_scalar_i ? scalar_i : 64'(vs1_i[16*i +: 16]),
                                                  64'(vs2_i[16*i +: 16]), 16));
      SEW32: for (int i = 0; i < VLEN / 32; i++)
               result_o[32*i +: 32] = 32'(elem(op_i, use_scalar_i ? scalar_i : 64'(vs1_i[32*i +: 32]),
                                                  64'(vs2_i[32*i +: 32]), 32));
      default: for (int i = 0; i < VLEN / 64; i++)
               result_o[64*i +: 64] = elem(op_i, use_scalar_i ? scalar_i : vs1_i[64*i +: 64],
                                           vs2_i[64*i +: 64], 64);
    endcase
    // vmv.x.s: element 0 of vs2, sign-extended to XLEN
    unique case (sew_i)
      SEW8:    scalar_result_o = XLEN'($signed(vs2_i[7:0]));
      SEW16:   scalar_result_o = XLEN'($signed(vs2_i[15:0]));
      SEW32:   scalar_result_o = XLEN'($signed(vs2_i[31:0]));
      default: scalar_result_o = vs2_i[63:0];
    endcase
  end

endmodule
