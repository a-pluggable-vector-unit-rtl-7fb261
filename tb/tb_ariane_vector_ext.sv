// tb_ariane_vector_ext: end-to-end test of the vector extension.
//
// The testbench plays the scalar core: it issues a random program of vector
// instructions (vsetvli/vsetvl with random SEW, LMUL and AVL, ALU and
// multiplier operations in .vv/.vx/.vi forms, vmv.x.s and illegal
// encodings) as fast as the vector unit accepts them, keeps at most 8
// instructions in flight (3-bit trans_id), collects write backs, and commits
// in program order after a random delay, handing the vector-CSR controls
// of each retiring instruction back to the CSRs. A reference model executes
// the same program sequentially; write-back values are checked as they
// arrive and the whole register file is compared at the end. It also
// exercises the CSR muxes and the pre-decoder, and counts how often each
// mechanism of the design happened; one that never happened is a failure.
// Runs at the design's default parameters.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_ariane_vector_ext;
  import vu_pkg::*;
  import vtb_pkg::*;

  localparam int NR_INSTR = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // DUT ports
  logic [31:0]     dec_instr;
  issue_entry_t    dec_scalar_entry, dec_entry;
  logic            dec_is_vector;
  logic            issue_valid, vu_ready;
  logic [31:0]     issue_instr;
  logic [XLEN-1:0] issue_a, issue_b;
  trans_id_t       issue_tid;
  logic            wb_valid [1];
  wb_req_t         wb_data  [1];
  trans_id_t       commit_tid;
  logic            commit_ack, commit_vcsr_valid;
  vcsr_ctrl_t      commit_vcsr;
  csr_op_e         csr_op, scalar_csr_op;
  logic [11:0]     csr_addr;
  logic [XLEN-1:0] csr_wdata, csr_rdata, scalar_csr_rdata;
  logic            csr_illegal, is_vcsr, vxsat, cfg_stall, hazard;
  vl_t             vstart;
  logic [1:0]      vxrm;

  ariane_vector_ext dut (
    .clk_i (clk), .rst_ni (rst_n),
    .dec_instr_i (dec_instr), .dec_scalar_entry_i (dec_scalar_entry),
    .dec_is_vector_o (dec_is_vector), .dec_entry_o (dec_entry),
    .issue_valid_i (issue_valid), .vu_ready_o (vu_ready), .issue_instr_i (issue_instr),
    .issue_scalar_a_i (issue_a), .issue_scalar_b_i (issue_b), .issue_trans_id_i (issue_tid),
    .wb_valid_o (wb_valid), .wb_data_o (wb_data),
    .commit_trans_id_i (commit_tid), .commit_ack_i (commit_ack),
    .commit_vcsr_valid_i (commit_vcsr_valid), .commit_vcsr_i (commit_vcsr),
    .csr_op_i (csr_op), .csr_addr_i (csr_addr), .csr_wdata_i (csr_wdata),
    .csr_rdata_o (csr_rdata), .csr_illegal_o (csr_illegal), .scalar_csr_op_o (scalar_csr_op),
    .scalar_csr_rdata_i (scalar_csr_rdata), .is_vcsr_o (is_vcsr),
    .vstart_o (vstart), .vxrm_o (vxrm), .vxsat_o (vxsat),
    .vu_cfg_stall_o (cfg_stall), .vu_hazard_o (hazard)
  );

  // ---------------------------------------------------------------- model
  logic [VLEN-1:0] mreg [NR_VREGS];
  int              m_vl = 0, m_w = 8, m_lmul = 1;
  logic            m_vill = 1'b1;

  typedef struct {
    logic [31:0] instr;
    logic [63:0] a, b;
    logic        exp_ex;
    logic        has_result;
    logic [63:0] exp_result;
    logic        is_cfg;
  } instr_t;

  instr_t prog [NR_INSTR];

  function automatic logic [63:0] get_elem(input int r, input int e, input int w);
    return zx(64'(mreg[r] >> (e * w)), w);
  endfunction

  function automatic void put_elem(input int r, input int e, input int w, input logic [63:0] v);
    logic [VLEN-1:0] m;
    m       = ((VLEN)'(1) << w) - 1;
    if (w == 64) m = {{(VLEN-64){1'b0}}, 64'hFFFF_FFFF_FFFF_FFFF};
    mreg[r] = (mreg[r] & ~(m << (e * w))) | ((VLEN'(v) & m) << (e * w));
  endfunction

  // execute one instruction on the model, filling in the expectations
  function automatic void model_exec(inout instr_t in);
    logic [5:0] f6;
    logic [2:0] f3;
    int vd, vs1, vs2, epr, avl, vlmax_m, sewc, lmc, e, idx;
    logic vm;
    vop_e op;
    logic [63:0] a;
    logic [10:0] zimm;
    f6 = in.instr[31:26]; vm = in.instr[25]; vs2 = int'(in.instr[24:20]);
    vs1 = int'(in.instr[19:15]); f3 = in.instr[14:12]; vd = int'(in.instr[11:7]);
    in.exp_ex = 1'b0; in.has_result = 1'b0; in.exp_result = '0; in.is_cfg = 1'b0;
    if (f3 == 3'b111) begin
      in.is_cfg = 1'b1; in.has_result = 1'b1;
      zimm = in.instr[31] ? in.b[10:0] : in.instr[30:20];
      if (zimm[10:4] != 0 || (in.instr[31] && in.b[63:11] != 0)) begin
        m_vill = 1'b1; m_vl = 0;
      end else begin
        sewc = int'(zimm[3:2]); lmc = int'(zimm[1:0]);
        m_vill = 1'b0; m_w = 8 << sewc; m_lmul = 1 << lmc;
        vlmax_m = m_lmul * VLEN / m_w;
        if (vs1 != 0) avl = (in.a > 64'(vlmax_m)) ? vlmax_m : int'(in.a);
        else if (vd != 0) avl = vlmax_m;
        else avl = (m_vl > vlmax_m) ? vlmax_m : m_vl;
        m_vl = avl;
      end
      in.exp_result = 64'(m_vl);
      return;
    end
    // legality as the ISA subset defines it
    op = VADD;
    in.exp_ex = 1'b1;
    if (vm && !m_vill) begin
      if (f3 == 3'b000 || f3 == 3'b100 || f3 == 3'b011) begin
        in.exp_ex = 1'b0;
        case (f6)
          6'b000000: op = VADD;   6'b000010: op = VSUB;   6'b000011: op = VRSUB;
          6'b000100: op = VMINU;  6'b000101: op = VMIN;   6'b000110: op = VMAXU;
          6'b000111: op = VMAX;   6'b001001: op = VAND;   6'b001010: op = VOR;
          6'b001011: op = VXOR;   6'b100101: op = VSLL;   6'b101000: op = VSRL;
          6'b101001: op = VSRA;   6'b010111: op = VMV;
          default: in.exp_ex = 1'b1;
        endcase
        if (f3 == 3'b011 && (op inside {VSUB, VMINU, VMIN, VMAXU, VMAX})) in.exp_ex = 1'b1;
        if (f3 == 3'b000 && op == VRSUB) in.exp_ex = 1'b1;
        if (op == VMV && vs2 != 0) in.exp_ex = 1'b1;
      end else if (f3 == 3'b010 || f3 == 3'b110) begin
        in.exp_ex = 1'b0;
        case (f6)
          6'b100101: op = VMUL; 6'b100111: op = VMULH; 6'b100100: op = VMULHU;
          6'b010000: begin op = VMVXS; if (f3 != 3'b010 || vs1 != 0) in.exp_ex = 1'b1; end
          default: in.exp_ex = 1'b1;
        endcase
      end
    end
    if (in.exp_ex) begin
      in.exp_result = '0;
      return;
    end
    if (op == VMVXS) begin
      in.has_result = 1'b1;
      in.exp_result = sx(get_elem(vs2, 0, m_w), m_w);
      return;
    end
    in.has_result = 1'b1;
    in.exp_result = '0;
    epr = VLEN / m_w;
    for (int j = 0; j < m_lmul; j++)
      for (e = 0; e < epr; e++) begin
        idx = j * epr + e;
        if (idx < m_vl) begin
          if (f3 == 3'b000 || f3 == 3'b010) a = get_elem(vs1 + j, e, m_w);
          else if (f3 == 3'b011) a = {{59{in.instr[19]}}, in.instr[19:15]};
          else a = in.a;
          put_elem(vd + j, e, m_w, ref_elem(op, a, get_elem(vs2 + j, e, m_w), m_w));
        end
      end
  endfunction

  // ---------------------------------------------------------- program
  function automatic logic [31:0] rand_vset(output logic [63:0] a, output logic [63:0] b);
    int k, rd, rs1;
    logic [10:0] zimm;
    k    = int'($urandom_range(0, 19));
    zimm = {3'b000, 4'b0000, 2'($urandom_range(0, 3)), 2'($urandom_range(0, 3))};
    if (k == 0) zimm[4] = 1'b1;                          // SEW = 128: unsupported
    a    = 64'($urandom_range(0, 140));
    b    = 64'(zimm);
    rd   = ($urandom_range(0, 3) == 0) ? 0 : 7;
    rs1  = ($urandom_range(0, 4) == 0) ? 0 : 11;
    if (k == 1) return enc_vsetvl(rd, rs1, 12);
    return enc_vsetvli(rd, rs1, zimm);
  endfunction

  function automatic int rreg(input int lmul);
    return int'($urandom_range(0, 31)) / lmul * lmul;
  endfunction

  function automatic logic [31:0] rand_arith(input int lmul, output logic [63:0] a);
    vop_e ops [14] = '{VADD, VSUB, VRSUB, VAND, VOR, VXOR, VSLL, VSRL, VSRA, VMINU, VMIN, VMAXU, VMAX, VMV};
    vop_e mops [3] = '{VMUL, VMULH, VMULHU};
    int k, vd, vs1, vs2;
    logic [2:0] f3;
    vop_e op;
    // reuse few registers so that micro-ops depend on each other
    vd  = rreg(lmul); vs1 = rreg(lmul); vs2 = rreg(lmul);
    if ($urandom_range(0, 2) == 0) vs2 = vd;
    a   = {$urandom, $urandom};
    k   = int'($urandom_range(0, 99));
    if (k < 35) begin
      op = mops[$urandom_range(0, 2)];
      f3 = ($urandom_range(0, 1) == 0) ? 3'b010 : 3'b110;
    end else if (k < 40) begin
      return enc_op(6'b010000, 1'b1, vs2, 0, 3'b010, 3);  // vmv.x.s
    end else if (k < 43) begin
      return enc_op(6'b001001, 1'b0, vs2, vs1, 3'b000, vd); // masked: illegal here
    end else if (k < 45) begin
      return enc_op(6'b111111, 1'b1, vs2, vs1, 3'b000, vd); // unknown funct6
    end else begin
      op = ops[$urandom_range(0, 13)];
      k  = int'($urandom_range(0, 2));
      f3 = (k == 0) ? 3'b000 : (k == 1) ? 3'b100 : 3'b011;
      if (f3 == 3'b011 && (op inside {VSUB, VMINU, VMIN, VMAXU, VMAX})) f3 = 3'b100;
      if (f3 == 3'b000 && op == VRSUB) f3 = 3'b100;
      if (op == VMV) vs2 = 0;
    end
    return enc_op(op_funct6(op), 1'b1, vs2, vs1, f3, vd);
  endfunction

  initial begin
    int lm;
    // fill every register: vmv.v.x under e64, m8, then the random program
    prog[0].instr = enc_vsetvli(7, 0, 11'b000_0000_1111); prog[0].a = 0; prog[0].b = 0;
    for (int g = 0; g < 4; g++) begin
      prog[1 + g].instr = enc_op(6'b010111, 1'b1, 0, 11, 3'b100, 8 * g);
      prog[1 + g].a = {$urandom, $urandom};
      prog[1 + g].b = 0;
    end
    lm = 8;
    for (int i = 5; i < NR_INSTR; i++) begin
      if ($urandom_range(0, 11) == 0 || i == 5) begin
        prog[i].instr = rand_vset(prog[i].a, prog[i].b);
        lm = prog[i].instr[31] ? 1 << prog[i].b[1:0] : 1 << prog[i].instr[21:20];
      end else begin
        prog[i].instr = rand_arith(lm, prog[i].a);
        prog[i].b = {$urandom, $urandom};
      end
    end
  end

  // ------------------------------------------------------------ core side
  int          issued = 0, committed = 0, wbs = 0;
  int          idx_of_tid [8];
  logic        wb_seen   [8];
  wb_req_t     wb_store  [8];
  int          cfg_wait = 0;
  logic        csr_phase = 1'b0;

  always_ff @(posedge clk) begin
    if (rst_n && wb_valid[0]) begin
      automatic int t = int'(wb_data[0].trans_id);
      automatic int i = idx_of_tid[t];
      wbs++;
      check(!wb_seen[t], "one write back per instruction");
      wb_seen[t]  <= 1'b1;
      wb_store[t] <= wb_data[0];
      check(wb_data[0].ex.valid == prog[i].exp_ex, $sformatf("exception flag of instr %0d %h", i, prog[i].instr));
      if (prog[i].exp_ex) begin
        check(wb_data[0].ex.cause == 64'd2 && wb_data[0].ex.tval == 64'(prog[i].instr), "exception cause/tval");
      end else begin
        check(wb_data[0].result == prog[i].exp_result,
              $sformatf("result of instr %0d %h: %h vs %h", i, prog[i].instr, wb_data[0].result, prog[i].exp_result));
      end
      if (prog[i].is_cfg) check(wb_data[0].csr.vl_we && wb_data[0].csr.vtype_we, "vsetvl updates vl and vtype");
    end
  end

  // mechanism counters
  int n_cfg_stall = 0, n_stall_held = 0, n_exc = 0, n_hazard = 0, n_chain = 0, n_lock_wait = 0;
  int n_bank_conf = 0, n_vwb_conf = 0, n_multi_uop = 0, n_tail = 0, n_qfull = 0, n_mul = 0, n_share = 0;

  always_ff @(posedge clk) if (rst_n) begin
    if (cfg_stall) n_cfg_stall++;
    if (wb_valid[0] && wb_data[0].ex.valid) n_exc++;
    if (hazard) n_hazard++;
    if (dut.i_vu.i_exec.g_fu[0].i_fu.ro_lock_req && dut.i_vu.i_exec.g_fu[0].i_fu.lock_gnt_i) n_chain++;
    if (dut.i_vu.i_exec.g_fu[1].i_fu.ro_lock_req && dut.i_vu.i_exec.g_fu[1].i_fu.lock_gnt_i) n_chain++;
    if (dut.i_vu.i_exec.lock_req[0] && !dut.i_vu.i_exec.lock_gnt[0]) n_lock_wait++;
    if (dut.i_vu.i_exec.lock_req[1] && !dut.i_vu.i_exec.lock_gnt[1]) n_lock_wait++;
    for (int f = 0; f < 2; f++) begin
      if (dut.i_vu.i_exec.wr_req[f] && !dut.i_vu.i_exec.wr_ack[f]) n_bank_conf++;
      for (int c = 0; c < 2; c++)
        if (dut.i_vu.i_exec.rd_req[f][c] && !dut.i_vu.i_exec.rd_gnt[f][c]) n_bank_conf++;
      if (dut.i_vu.uop_valid[f] && dut.i_vu.uop_ready[f] && !dut.i_vu.uop[f].last) n_multi_uop++;
      if (dut.i_vu.uop_valid[f] && dut.i_vu.uop_ready[f] && dut.i_vu.uop[f].writes_vd
          && dut.i_vu.uop[f].be != '0 && dut.i_vu.uop[f].be != '1) n_tail++;
      if (dut.i_vu.uop_valid[f] && !dut.i_vu.uop_ready[f]) n_qfull++;
      // read lock kept across micro-ops: release mask narrower than the reads
      if (dut.i_vu.i_exec.g_fu[0].i_fu.i_ro.rel_now && dut.i_vu.i_exec.g_fu[0].i_fu.i_ro.head_ok
          && (dut.i_vu.i_exec.g_fu[0].i_fu.i_ro.pmask & uop_rd_mask(dut.i_vu.i_exec.g_fu[0].i_fu.head_uop)) != '0
          && f == 0) n_share++;
    end
    if (dut.i_vu.i_vwb.req_i[0] + dut.i_vu.i_vwb.req_i[1] + dut.i_vu.i_vwb.req_i[2] + dut.i_vu.i_vwb.req_i[3] > 1) n_vwb_conf++;
    if (dut.i_vu.i_exec.g_fu[1].i_fu.ex_in_fire) n_mul++;
  end

  // stimulus
  initial begin
    issue_valid = 0; issue_instr = 0; issue_a = 0; issue_b = 0; issue_tid = 0;
    commit_ack = 0; commit_tid = 0; commit_vcsr_valid = 0; commit_vcsr = '0;
    csr_op = CSR_NOP; csr_addr = '0; csr_wdata = '0; scalar_csr_rdata = 64'hABCD;
    dec_instr = '0; dec_scalar_entry = '0;
    for (int t = 0; t < 8; t++) begin wb_seen[t] = 1'b0; idx_of_tid[t] = 0; end
    for (int r = 0; r < NR_VREGS; r++) mreg[r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // ---- CSRs after reset: vtype.vill = 1, vl = 0, vlenb = VLEN/8
    csr_op = CSR_READ; csr_addr = 12'hC21; #1;
    check(csr_rdata == 64'h8000_0000_0000_0000 && is_vcsr && scalar_csr_op == CSR_NOP, "vtype after reset");
    csr_addr = 12'hC22; #1; check(csr_rdata == 64'(VLEN / 8), "vlenb");
    csr_addr = 12'h300; #1; check(csr_rdata == 64'hABCD && !is_vcsr && scalar_csr_op == CSR_READ, "scalar CSR passes through");
    csr_op = CSR_WRITE; csr_addr = 12'hC20; csr_wdata = 5; #1; check(csr_illegal, "vl is read only");
    csr_addr = 12'h00F; csr_wdata = 64'h7; @(posedge clk); #1;
    check(vxrm == 2'b11 && vxsat, "vcsr writes vxrm and vxsat");
    csr_op = CSR_CLEAR; csr_addr = 12'h009; csr_wdata = 1; @(posedge clk); #1;
    check(!vxsat && vxrm == 2'b11, "vxsat cleared alone");
    csr_op = CSR_WRITE; csr_addr = 12'h008; csr_wdata = 3; @(posedge clk); #1;
    check(vstart == 3, "vstart written");
    csr_op = CSR_NOP;

    // ---- pre-decoder and its mux
    dec_scalar_entry.rd = 5'd9;
    dec_instr = 32'h0000_0033; #1; // add x0,x0,x0
    check(!dec_is_vector && dec_entry.rd == 5'd9, "scalar entry selected");
    dec_instr = enc_op(6'b000000, 1'b1, 2, 5, 3'b100, 1); #1; // vadd.vx
    check(dec_is_vector && dec_entry.rs1_rf == RF_GPR && dec_entry.rd_rf == RF_NONE, "vadd.vx reads gp rs1");
    dec_instr = enc_op(6'b000000, 1'b1, 2, 5, 3'b101, 1); #1; // vfadd.vf
    check(dec_is_vector && dec_entry.rs1_rf == RF_FPR, "vfadd.vf reads fp rs1");
    dec_instr = enc_op(6'b010000, 1'b1, 2, 0, 3'b010, 6); #1;
    check(dec_entry.rd_rf == RF_GPR && dec_entry.rd == 5'd6, "vmv.x.s writes gp rd");
    dec_instr = enc_vsetvl(3, 4, 5); #1;
    check(dec_entry.is_vcfg && dec_entry.rs2_rf == RF_GPR && dec_entry.rs1_rf == RF_GPR, "vsetvl operands");

    // ---- the program
    @(negedge clk);
    while (issued < NR_INSTR) begin
      if (vu_ready && (issued - committed) < 8) begin
        issue_valid = 1'b1;
        issue_instr = prog[issued].instr;
        issue_a     = prog[issued].a;
        issue_b     = prog[issued].b;
        issue_tid   = trans_id_t'(issued);
        @(posedge clk);
        idx_of_tid[issued % 8] = issued;
        wb_seen[issued % 8]    = 1'b0;
        model_exec(prog[issued]);
        issued++;
        @(negedge clk);
        issue_valid = 1'b0;
      end else begin
        @(negedge clk);
      end
    end
    while (committed < NR_INSTR) @(negedge clk);
    repeat (20) @(negedge clk);

    // ---- final register file against the model
    for (int r = 0; r < NR_VREGS / 4; r++) begin
      check(dut.i_vu.i_exec.i_vrf.g_bank[0].i_bank.mem[r] == mreg[4 * r + 0], $sformatf("v%0d", 4 * r + 0));
      check(dut.i_vu.i_exec.i_vrf.g_bank[1].i_bank.mem[r] == mreg[4 * r + 1], $sformatf("v%0d", 4 * r + 1));
      check(dut.i_vu.i_exec.i_vrf.g_bank[2].i_bank.mem[r] == mreg[4 * r + 2], $sformatf("v%0d", 4 * r + 2));
      check(dut.i_vu.i_exec.i_vrf.g_bank[3].i_bank.mem[r] == mreg[4 * r + 3], $sformatf("v%0d", 4 * r + 3));
    end
    check(int'(dut.i_vcsrs.vl_q) == m_vl, "final vl");
    check(vstart == 0, "vstart cleared by retiring vector instructions");
    check(wbs == NR_INSTR, "every instruction wrote back once");

    $display("mechanisms: cfg_stall=%0d stall_held=%0d exceptions=%0d hazard=%0d chain=%0d lock_wait=%0d bank_conflict=%0d vwb_conflict=%0d multi_uop=%0d tail=%0d queue_full=%0d mul=%0d shared_lock=%0d",
             n_cfg_stall, n_stall_held, n_exc, n_hazard, n_chain, n_lock_wait, n_bank_conf, n_vwb_conf,
             n_multi_uop, n_tail, n_qfull, n_mul, n_share);
    check(n_cfg_stall > 0, "configuration stall happened");
    check(n_stall_held > 0, "issue held until a vsetvl committed");
    check(n_exc > 0, "exception happened");
    check(n_hazard > 0, "inter-unit hazard hold happened");
    check(n_chain > 0, "chained lock of the next micro-op happened");
    check(n_lock_wait > 0, "lock wait happened");
    check(n_bank_conf > 0, "bank conflict happened");
    check(n_vwb_conf > 0, "write-back arbitration conflict happened");
    check(n_multi_uop > 0, "multi micro-op instruction happened");
    check(n_tail > 0, "partial tail micro-op happened");
    check(n_qfull > 0, "queue back-pressure happened");
    check(n_mul > 0, "multiplier unit used");
    check(n_share > 0, "read lock kept for the next micro-op");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // in-order commit after a random delay
  initial begin
    int delay;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      commit_ack = 1'b0; commit_vcsr_valid = 1'b0;
      if (committed < issued && wb_seen[committed % 8]) begin
        delay = int'($urandom_range(0, 6));
        repeat (delay) begin
          @(negedge clk);
          // a vsetvl that wrote back but has not committed holds issue off
          if (prog[committed].is_cfg) begin
            check(!vu_ready, "ready low until vsetvl commits");
            n_stall_held++;
          end
        end
        commit_ack        = 1'b1;
        commit_tid        = trans_id_t'(committed);
        commit_vcsr_valid = !wb_store[committed % 8].ex.valid;
        commit_vcsr       = wb_store[committed % 8].csr;
        @(posedge clk);
        committed++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: issued=%0d committed=%0d", issued, committed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
