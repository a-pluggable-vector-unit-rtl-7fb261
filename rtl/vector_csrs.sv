// vector_csrs: the seven vector CSRs and the muxes around the scalar CSRs.
//
// Holds vstart, vxsat, vxrm (vcsr is the view {vxrm, vxsat} of the two),
// vl and vtype; vlenb is the constant VLEN/8. A CSR instruction from the
// core whose address is a vector CSR is served here and reaches the core's
// scalar CSR file as a NOP (input mux); on reads, the output mux returns
// the vector CSR or the scalar file's data. vl, vtype and vlenb are read
// only: writing them raises csr_illegal.
// The vector unit changes vl, vtype and vstart only through the controls
// it writes back; the core applies them (update_i) when the instruction
// retires, so every later instruction sees the new configuration. The core
// never commits a CSR instruction in the same cycle as a vector
// instruction. Reset: vtype.vill = 1, vl = 0, all others 0.
// Addresses follow the RISC-V V draft v0.9; the muxing follows the source.
//
// Lint reports the upper bits of the computed new CSR value as unused: the
// writable vector CSRs are narrower than XLEN and keep only their low bits.
module vector_csrs
  import vu_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  // CSR instruction from the core
  input  csr_op_e         csr_op_i,
  input  logic [11:0]     csr_addr_i,
  input  logic [XLEN-1:0] csr_wdata_i,
  output logic [XLEN-1:0] csr_rdata_o,
  output logic            csr_illegal_o,
  output logic            is_vcsr_o,
  // scalar CSR file
  output csr_op_e         scalar_csr_op_o,
  input  logic [XLEN-1:0] scalar_rdata_i,
  // updates carried by a retiring vector instruction
  input  logic            update_i,
  input  vcsr_ctrl_t      update_ctrl_i,
  // current values toward the vector unit
  output vtype_t          vtype_o,
  output vl_t             vl_o,
  output vl_t             vstart_o,
  output logic [1:0]      vxrm_o,
  output logic            vxsat_o
);

  vl_t        vstart_q, vl_q;
  vtype_t     vtype_q;
  logic [1:0] vxrm_q;
  logic       vxsat_q;

  logic            rd_only, writes;
  logic [XLEN-1:0] old, new_val;

  always_comb begin
    is_vcsr_o = 1'b1;
    rd_only   = 1'b0;
    unique case (csr_addr_i)
      CSR_VSTART: old = XLEN'(vstart_q);
      CSR_VXSAT:  old = XLEN'(vxsat_q);
      CSR_VXRM:   old = XLEN'(vxrm_q);
      CSR_VCSR:   old = XLEN'({vxrm_q, vxsat_q});
      CSR_VL:     begin old = XLEN'(vl_q);          rd_only = 1'b1; end
      CSR_VTYPE:  begin old = vtype_to_csr(vtype_q); rd_only = 1'b1; end
      CSR_VLENB:  begin old = XLEN'(VLENB);         rd_only = 1'b1; end
      default:    begin old = '0; is_vcsr_o = 1'b0; end
    endcase
    unique case (csr_op_i)
      CSR_WRITE: new_val = csr_wdata_i;
      CSR_SET:   new_val = old | csr_wdata_i;
      CSR_CLEAR: new_val = old & ~csr_wdata_i;
      default:   new_val = old;
    endcase
    writes          = is_vcsr_o && csr_op_i inside {CSR_WRITE, CSR_SET, CSR_CLEAR};
    csr_illegal_o   = writes && rd_only;
    scalar_csr_op_o = is_vcsr_o ? CSR_NOP : csr_op_i;
    csr_rdata_o     = is_vcsr_o ? old : scalar_rdata_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      vstart_q      <= '0;
      vl_q          <= '0;
      vtype_q       <= '0;
      vtype_q.vill  <= 1'b1;
      vxrm_q        <= '0;
      vxsat_q       <= 1'b0;
    end else begin
      if (writes && !rd_only) begin
        unique case (csr_addr_i)
          CSR_VSTART: vstart_q <= vl_t'(new_val);
          CSR_VXSAT:  vxsat_q  <= new_val[0];
          CSR_VXRM:   vxrm_q   <= new_val[1:0];
          CSR_VCSR:   {vxrm_q, vxsat_q} <= new_val[2:0];
          default: ;
        endcase
      end
      if (update_i) begin
        if (update_ctrl_i.vl_we)      vl_q     <= update_ctrl_i.vl;
        if (update_ctrl_i.vtype_we)   vtype_q  <= update_ctrl_i.vtype;
        if (update_ctrl_i.vstart_clr) vstart_q <= '0;
      end
    end
  end

  assign vtype_o  = vtype_q;
  assign vl_o     = vl_q;
  assign vstart_o = vstart_q;
  assign vxrm_o   = vxrm_q;
  assign vxsat_o  = vxsat_q;

  assert property (@(posedge clk_i) disable iff (!rst_ni) !(writes && update_i))
    else $error("CSR instruction committed together with a vector instruction");

endmodule
