// tb_vector_csrs: random CSR instructions (read, write, set, clear) and
// vector-instruction updates against a model of the seven vector CSRs;
// read-only CSRs reject writes, non-vector addresses are passed to the
// scalar CSR file unchanged.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_vector_csrs;
  import vu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  csr_op_e op, sop; logic [11:0] addr; logic [63:0] wd, rd, srd; logic ill, isv, upd; vcsr_ctrl_t uc;
  vtype_t vt; vl_t vl, vs; logic [1:0] xrm; logic xsat;
  vector_csrs dut (.clk_i(clk), .rst_ni(rst_n), .csr_op_i(op), .csr_addr_i(addr), .csr_wdata_i(wd),
    .csr_rdata_o(rd), .csr_illegal_o(ill), .is_vcsr_o(isv), .scalar_csr_op_o(sop), .scalar_rdata_i(srd),
    .update_i(upd), .update_ctrl_i(uc), .vtype_o(vt), .vl_o(vl), .vstart_o(vs), .vxrm_o(xrm), .vxsat_o(xsat));
  // model
  vl_t m_vstart, m_vl; vtype_t m_vtype; logic [1:0] m_vxrm; logic m_vxsat;
  logic [11:0] addrs [8] = '{12'h008, 12'h009, 12'h00A, 12'h00F, 12'hC20, 12'hC21, 12'hC22, 12'h300};
  function automatic logic [63:0] m_read(logic [11:0] a);
    case (a)
      12'h008: return 64'(m_vstart);
      12'h009: return 64'(m_vxsat);
      12'h00A: return 64'(m_vxrm);
      12'h00F: return 64'({m_vxrm, m_vxsat});
      12'hC20: return 64'(m_vl);
      12'hC21: return m_vtype.vill ? 64'h8000_0000_0000_0000
                 : 64'({m_vtype.vma, m_vtype.vta, 2'b00, m_vtype.vsew, m_vtype.vlmul});
      12'hC22: return 64'(VLENB);
      default: return srd;
    endcase
  endfunction
  initial begin
    op = CSR_NOP; addr = 0; wd = 0; srd = 64'h5555; upd = 0; uc = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    m_vstart = 0; m_vl = 0; m_vtype = '0; m_vtype.vill = 1; m_vxrm = 0; m_vxsat = 0;
    @(negedge clk);
    check(vt.vill && vl == 0, "reset: vill set, vl 0");
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] old, nv; logic ro, vc;
      if ($urandom_range(0, 3) == 0) begin
        op = CSR_NOP; upd = 1; uc = '0;
        uc.vl_we = $urandom; uc.vl = vl_t'($urandom); uc.vtype_we = $urandom;
        uc.vtype = vtype_t'($urandom); uc.vstart_clr = $urandom;
        #1;
        @(negedge clk); upd = 0;
        if (uc.vl_we) m_vl = uc.vl;
        if (uc.vtype_we) m_vtype = uc.vtype;
        if (uc.vstart_clr) m_vstart = 0;
      end else begin
        op = csr_op_e'($urandom_range(1, 4)); addr = addrs[$urandom_range(0, 7)];
        wd = {$urandom, $urandom}; srd = {$urandom, $urandom};
        #1;
        vc = addr != 12'h300; ro = addr[11:8] == 4'hC;
        old = m_read(addr);
        check(rd == old, $sformatf("read of %h", addr));
        check(isv == vc && sop == (vc ? CSR_NOP : op), "routing");
        check(ill == (vc && ro && op != CSR_READ), "read-only CSRs reject writes");
        case (op) CSR_WRITE: nv = wd; CSR_SET: nv = old | wd; CSR_CLEAR: nv = old & ~wd; default: nv = old; endcase
        @(negedge clk);
        if (vc && !ro && op != CSR_READ)
          case (addr)
            12'h008: m_vstart = vl_t'(nv);
            12'h009: m_vxsat = nv[0];
            12'h00A: m_vxrm = nv[1:0];
            12'h00F: {m_vxrm, m_vxsat} = nv[2:0];
            default: ;
          endcase
        op = CSR_NOP;
      end
      check(vt == m_vtype && vl == m_vl && vs == m_vstart && xrm == m_vxrm && xsat == m_vxsat, "state");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
