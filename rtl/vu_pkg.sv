// vu_pkg: types and constants shared by the vector unit.
//
// The vector unit plugs into a 64-bit in-order RISC-V core as one more
// functional unit. It implements the RISC-V "V" extension draft with its 32
// vector registers and 7 vector CSRs (vstart, vxsat, vxrm, vcsr, vl, vtype,
// vlenb). XLEN = 64 and the 32 registers follow the source; VLEN = 128,
// ELEN = 64, the transaction-id width and the set of functional units are
// this design's choices. vtype follows the v0.9 layout:
// vlmul[1:0] = bits 1:0, vsew = bits 4:2, vlmul[2] = bit 5, vta = 6,
// vma = 7, vill = XLEN-1. Only integer LMUL (1, 2, 4, 8) and SEW 8..64 are
// supported; anything else sets vill.
//
// Lint reports unused micro-op fields inside uop_rd_mask/uop_wr_mask: each
// looks only at the register fields of the micro-op it is given.
// Linting a single module reports the package constants that module does
// not use (the CSR addresses, for example, serve only vector_csrs).
package vu_pkg;

  localparam int unsigned XLEN          = 64;
  localparam int unsigned ELEN          = 64;
  localparam int unsigned VLEN          = 128;
  localparam int unsigned NR_VREGS      = 32;
  localparam int unsigned NR_BANKS      = 4;
  localparam int unsigned TRANS_ID_BITS = 3;
  localparam int unsigned NR_FUS        = 2;   // SIMD functional units
  localparam int unsigned VLENB         = VLEN / 8;
  // largest vl: LMUL = 8 and SEW = 8
  localparam int unsigned VL_BITS       = $clog2(8 * VLEN / 8 + 1);
  localparam int unsigned REG_BITS      = $clog2(NR_VREGS);

  typedef logic [TRANS_ID_BITS-1:0] trans_id_t;
  typedef logic [NR_VREGS-1:0]      vreg_mask_t;
  typedef logic [VLEN-1:0]          vreg_data_t;
  typedef logic [VLENB-1:0]         vreg_be_t;
  typedef logic [REG_BITS-1:0]      vreg_idx_t;
  typedef logic [VL_BITS-1:0]       vl_t;

  typedef enum logic [1:0] {SEW8 = 2'd0, SEW16 = 2'd1, SEW32 = 2'd2, SEW64 = 2'd3} vsew_e;

  // decoded vtype (only the supported subset)
  typedef struct packed {
    logic       vill;
    logic       vma;
    logic       vta;
    vsew_e      vsew;
    logic [1:0] vlmul;   // LMUL = 1 << vlmul
  } vtype_t;

  // functional unit a micro-op goes to
  typedef enum logic [0:0] {FU_ALU = 1'b0, FU_MUL = 1'b1} fu_e;

  typedef enum logic [4:0] {
    VADD, VSUB, VRSUB, VAND, VOR, VXOR, VSLL, VSRL, VSRA,
    VMINU, VMIN, VMAXU, VMAX, VMV, VMVXS,
    VMUL, VMULH, VMULHU,
    VSETVLI, VSETVL
  } vop_e;

  typedef enum logic [1:0] {SRC_VV = 2'd0, SRC_VX = 2'd1, SRC_VI = 2'd2} vsrc_e;

  typedef struct packed {
    logic            valid;
    logic [XLEN-1:0] cause;
    logic [XLEN-1:0] tval;
  } exception_t;

  localparam logic [XLEN-1:0] CAUSE_ILLEGAL_INSTR = 64'd2;

  // controls for the vector CSRs carried along with a write back
  typedef struct packed {
    logic   vl_we;
    vl_t    vl;
    logic   vtype_we;
    vtype_t vtype;
    logic   vstart_clr;
  } vcsr_ctrl_t;

  // one request toward the core's write-back port
  typedef struct packed {
    trans_id_t       trans_id;
    logic [XLEN-1:0] result;
    exception_t      ex;
    vcsr_ctrl_t      csr;
  } wb_req_t;

  // fully decoded vector instruction
  typedef struct packed {
    logic            illegal;
    logic            is_cfg;
    fu_e             fu;
    vop_e            op;
    vsrc_e           src;
    vreg_idx_t       vd;
    vreg_idx_t       vs1;
    vreg_idx_t       vs2;
    logic            rs1_is_x0;
    logic            rd_is_x0;
    logic            writes_vd;
    logic            writes_scalar;
    logic [XLEN-1:0] scalar;     // rs1 value or sign-extended immediate
    logic [XLEN-1:0] scalar_b;   // rs2 value (vsetvl)
    vtype_t          new_vtype;  // vsetvli immediate
    vsew_e           sew;        // current vtype
    logic [1:0]      lmul;
    vl_t             vl;
    trans_id_t       trans_id;
    logic [31:0]     instr;
  } decoded_t;

  // one packed-SIMD micro-operation: one register of a register group
  typedef struct packed {
    vop_e            op;
    vreg_idx_t       vd;
    vreg_idx_t       vs1;
    vreg_idx_t       vs2;
    logic            use_vs1;
    logic            use_vs2;
    logic            writes_vd;
    logic            writes_scalar;
    logic [XLEN-1:0] scalar;
    vsew_e           sew;
    vreg_be_t        be;        // bytes of vd holding active elements
    logic            last;      // last micro-op of its instruction
    trans_id_t       trans_id;
  } uop_t;

  // register file an operand of a vector instruction lives in (pre-decode)
  typedef enum logic [1:0] {RF_NONE = 2'd0, RF_GPR = 2'd1, RF_FPR = 2'd2} rf_e;

  // what the core's issue logic needs to know about an instruction
  typedef struct packed {
    logic        is_vector;
    logic        is_vcfg;
    logic [4:0]  rs1;
    rf_e         rs1_rf;
    logic [4:0]  rs2;
    rf_e         rs2_rf;
    logic [4:0]  rd;
    rf_e         rd_rf;
    logic [31:0] instr;
  } issue_entry_t;

  // CSR instruction operations as seen by the CSR files
  typedef enum logic [2:0] {CSR_NOP, CSR_READ, CSR_WRITE, CSR_SET, CSR_CLEAR} csr_op_e;

  localparam logic [11:0] CSR_VSTART = 12'h008;
  localparam logic [11:0] CSR_VXSAT  = 12'h009;
  localparam logic [11:0] CSR_VXRM   = 12'h00A;
  localparam logic [11:0] CSR_VCSR   = 12'h00F;
  localparam logic [11:0] CSR_VL     = 12'hC20;
  localparam logic [11:0] CSR_VTYPE  = 12'hC21;
  localparam logic [11:0] CSR_VLENB  = 12'hC22;

  function automatic vreg_mask_t reg_bit(input vreg_idx_t r);
    vreg_mask_t m;
    m    = '0;
    m[r] = 1'b1;
    return m;
  endfunction

  function automatic vreg_mask_t uop_rd_mask(input uop_t u);
    return (u.use_vs1 ? reg_bit(u.vs1) : '0) | (u.use_vs2 ? reg_bit(u.vs2) : '0);
  endfunction

  function automatic vreg_mask_t uop_wr_mask(input uop_t u);
    return u.writes_vd ? reg_bit(u.vd) : '0;
  endfunction

  // vtype CSR image <-> decoded vtype
  function automatic logic [XLEN-1:0] vtype_to_csr(input vtype_t t);
    logic [XLEN-1:0] v;
    v         = '0;
    v[XLEN-1] = t.vill;
    if (!t.vill) v[7:0] = {t.vma, t.vta, 1'b0, 1'b0, t.vsew, t.vlmul};
    return v;
  endfunction

  // decode a raw vtype value (vsetvli zimm or vsetvl rs2)
  function automatic vtype_t vtype_from_raw(input logic [XLEN-1:0] raw);
    vtype_t t;
    t.vma   = raw[7];
    t.vta   = raw[6];
    t.vsew  = vsew_e'(raw[3:2]);
    t.vlmul = raw[1:0];
    // fractional LMUL, SEW above ELEN and reserved bits are not supported
    t.vill  = raw[5] | (unsigned'(8 << raw[4:2]) > ELEN) | (|raw[XLEN-1:8]);
    if (t.vill) begin
      t.vma = 1'b0; t.vta = 1'b0; t.vsew = SEW8; t.vlmul = 2'd0;
    end
    return t;
  endfunction

  // VLMAX = LMUL * VLEN / SEW
  function automatic vl_t vlmax(input vsew_e sew, input logic [1:0] lmul);
    return vl_t'(((VLEN / 8) << lmul) >> sew);
  endfunction

endpackage
