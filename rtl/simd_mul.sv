// simd_mul: packed-SIMD integer multiplier, the execute part of the MUL unit.
//
// Same functional-unit interface as simd_alu. Computes, per SEW-wide
// element, vmul (low half of the product), vmulh (high half, signed x
// signed) or vmulhu (high half, unsigned x unsigned) of vs2 and vs1 (or the
// replicated scalar). One register stage: the result appears the cycle
// after the operands are accepted and is held until out_ready; in_ready is
// high when the stage is empty or being emptied. The source leaves the set
// of units open; this unit and its one-stage pipeline are this design's
// choices, made to show a sequential unit behind the same interface.
module simd_mul
  import vu_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
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

  function automatic logic [63:0] elem(input vop_e op, input logic [63:0] a,
                                       input logic [63:0] b, input int w);
    logic [127:0] ua, ub, prod;
    logic [63:0]  mask;
    mask = (w == 64) ? '1 : ((64'd1 << w) - 1);
    if (op == VMULHU) begin
      ua = {64'd0, a & mask};
      ub = {64'd0, b & mask};
    end else begin
      ua = 128'($signed(a << (64 - w)) >>> (64 - w));
      ub = 128'($signed(b << (64 - w)) >>> (64 - w));
    end
    prod = ua * ub;
    if (op == VMUL) return prod[63:0] & mask;
    else            return 64'(prod >> w) & mask;
  endfunction

  vreg_data_t res;

  always_comb begin
    res = '0;
    unique case (sew_i)
      SEW8:  for (int i = 0; i < VLEN / 8; i++)
               res[8*i +: 8] = 8'(elem(op_i, use_scalar_i ? scalar_i : 64'(vs1_i[8*i +: 8]),
                                           64'(vs2_i[8*i +: 8]), 8));
      SEW16: for (int i = 0; i < VLEN / 16; i++)
               res[16*i +: 16] = 16'(elem(op_i, use_scalar_i ? scalar_i : 64'(vs1_i[16*i +: 16]),
                                             64'(vs2_i[16*i +: 16]), 16));
      SEW32: for (int i = 0; i < VLEN / 32; i++)
               res[32*i +: 32] = 32'(elem(op_i, use_scalar_i ? scalar_i : 64'(vs1_i[32*i +: 32]),
                                             64'(vs2_i[32*i +: 32]), 32));
      default: for (int i = 0; i < VLEN / 64; i++)
               res[64*i +: 64] = elem(op_i, use_scalar_i ? scalar_i : vs1_i[64*i +: 64],
                                      vs2_i[64*i +: 64], 64);
    endcase
  end

  logic valid_q;
  assign in_ready_o      = !valid_q || out_ready_i;
  assign out_valid_o     = valid_q;
  assign scalar_result_o = '0;
  assign exception_o     = '0;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_q  <= 1'b0;
      result_o <= '0;
    end else if (in_ready_o) begin
      valid_q <= in_valid_i;
      if (in_valid_i) result_o <= res;
    end
  end

endmodule
