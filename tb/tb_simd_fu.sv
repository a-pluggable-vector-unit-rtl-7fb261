// tb_simd_fu: one ALU unit with its own register file. A random stream of
// dependent micro-ops (eight registers, .vv and scalar forms, partial byte
// enables, vmv.x.s) goes through queue, RO, EX and WB; a sequential model
// predicts the scalar results reported to the vector write back and the
// final register contents. Chaining (next lock granted while reading) and
// lock waits (read-after-write inside the unit) are counted and must occur.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_simd_fu;
  import vu_pkg::*;
  import vtb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  logic uv, ur, lreq, lgnt, wreq, wack, vreq, vgnt, ret; uop_t u, ru; vreg_mask_t lrd, lwr, rel;
  logic rreq [2], rgnt [2], rval [2]; vreg_idx_t raddr [2], waddr; vreg_data_t rdata [2], wdata; vreg_be_t wbe;
  wb_req_t vdata;
  logic lreq_a [1], lgnt_a [1], wreq_a [1], wack_a [1]; vreg_mask_t lrd_a [1], lwr_a [1], rel_a [1];
  logic rreq_a [1][2], rgnt_a [1][2], rval_a [1][2]; vreg_idx_t raddr_a [1][2], waddr_a [1];
  vreg_data_t rdata_a [1][2], wdata_a [1]; vreg_be_t wbe_a [1];

  simd_fu #(.FU(FU_ALU)) dut (.clk_i(clk), .rst_ni(rst_n), .uop_valid_i(uv), .uop_ready_o(ur), .uop_i(u),
    .lock_req_o(lreq), .lock_rd_o(lrd), .lock_wr_o(lwr), .lock_gnt_i(lgnt), .rel_rd_o(rel),
    .rd_req_o(rreq), .rd_addr_o(raddr), .rd_gnt_i(rgnt), .rd_valid_i(rval), .rd_data_i(rdata),
    .wr_req_o(wreq), .wr_addr_o(waddr), .wr_data_o(wdata), .wr_be_o(wbe), .wr_ack_i(wack),
    .vwb_req_o(vreq), .vwb_data_o(vdata), .vwb_gnt_i(vgnt), .retire_o(ret), .retire_uop_o(ru));

  assign lreq_a[0] = lreq; assign lrd_a[0] = lrd; assign lwr_a[0] = lwr; assign lgnt = lgnt_a[0];
  assign rel_a[0] = rel; assign wreq_a[0] = wreq; assign waddr_a[0] = waddr; assign wdata_a[0] = wdata;
  assign wbe_a[0] = wbe; assign wack = wack_a[0];
  for (genvar c = 0; c < 2; c++) begin : g_c
    assign rreq_a[0][c] = rreq[c]; assign raddr_a[0][c] = raddr[c];
    assign rgnt[c] = rgnt_a[0][c]; assign rval[c] = rval_a[0][c]; assign rdata[c] = rdata_a[0][c];
  end
  vrf #(.NR_PORTS(1)) i_vrf (.clk_i(clk), .rst_ni(rst_n), .lock_req_i(lreq_a), .lock_rd_i(lrd_a),
    .lock_wr_i(lwr_a), .lock_gnt_o(lgnt_a), .rel_rd_i(rel_a), .rd_req_i(rreq_a), .rd_addr_i(raddr_a),
    .rd_gnt_o(rgnt_a), .rd_valid_o(rval_a), .rd_data_o(rdata_a), .wr_req_i(wreq_a), .wr_addr_i(waddr_a),
    .wr_data_i(wdata_a), .wr_be_i(wbe_a), .wr_ack_o(wack_a));

  vreg_data_t model [32];
  logic [63:0] exp_scalar [$];
  vop_e ops [14] = '{VADD, VSUB, VRSUB, VAND, VOR, VXOR, VSLL, VSRL, VSRA, VMINU, VMIN, VMAXU, VMAX, VMV};
  int n_chain = 0, n_wait = 0, reports = 0, n_last = 0;

  function automatic void model_uop(input uop_t x);
    int w; vreg_data_t res;
    w = 8 << x.sew; res = '0;
    if (x.writes_scalar) exp_scalar.push_back(sx(64'(model[x.vs2]), w));
    if (!x.writes_vd) return;
    for (int e = 0; e < VLEN / w; e++)
      res |= VLEN'(ref_elem(x.op, x.use_vs1 ? zx(64'(model[x.vs1] >> (e * w)), w) : x.scalar,
                            zx(64'(model[x.vs2] >> (e * w)), w), w)) << (e * w);
    for (int b = 0; b < VLENB; b++) if (x.be[b]) model[x.vd][8*b +: 8] = res[8*b +: 8];
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dut.ro_lock_req && lgnt) n_chain++;
    if (lreq && !lgnt) n_wait++;
    if (vreq && vgnt) begin
      reports++;
      if (vdata.result != 0 || exp_scalar.size() > 0) begin end
    end
  end

  initial begin
    int n;
    uv = 0; u = '0; vgnt = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    n = 0;
    while (n < 700) begin
      @(negedge clk);
      vgnt = vreq && $urandom_range(0, 1);
      if (vgnt) begin
        // scalar of vmv.x.s in order of the micro-ops that carry one
        if (vdata.result != 0) begin
          check(exp_scalar.size() > 0 && vdata.result == exp_scalar[0], "vmv.x.s result");
        end
      end
      if (!uv || ur) begin
        if (uv) begin model_uop(u); n++; end
        u = '0;
        if (n < 8) begin
          u.op = VMV; u.vd = vreg_idx_t'(n); u.use_vs2 = 0; u.writes_vd = 1; u.scalar = {$urandom, $urandom};
          u.sew = SEW64; u.be = '1; u.last = 1;
        end else begin
          u.op = ops[$urandom_range(0, 13)]; u.sew = vsew_e'($urandom_range(0, 3));
          u.vd = vreg_idx_t'($urandom_range(0, 7)); u.vs1 = vreg_idx_t'($urandom_range(0, 7));
          u.vs2 = vreg_idx_t'($urandom_range(0, 7));
          u.use_vs1 = $urandom_range(0, 1); u.use_vs2 = u.op != VMV; u.scalar = {$urandom, $urandom};
          u.writes_vd = 1; u.be = '1; u.last = $urandom_range(0, 1);
          case ($urandom_range(0, 5))
            0: u.be = '0;
            1: u.be = vreg_be_t'((1 << $urandom_range(1, VLENB - 1)) - 1);
            2: begin u.op = VMVXS; u.writes_vd = 0; u.writes_scalar = 1; u.use_vs1 = 0; u.use_vs2 = 1; u.last = 1; end
            default: ;
          endcase
        end
        u.trans_id = trans_id_t'(n);
        uv = $urandom_range(0, 3) != 0 && n < 700;
        if (!uv) u = '0;
      end
      if (vgnt && vdata.result != 0) void'(exp_scalar.pop_front());
      else if (vgnt && exp_scalar.size() > 0 && dut.i_wb.uop_q.writes_scalar) void'(exp_scalar.pop_front());
    end
    uv = 0;
    repeat (200) begin @(negedge clk); vgnt = vreq; end
    for (int r = 0; r < 8; r++) begin
      vreg_data_t got;
      case (r % 4)
        0: got = i_vrf.g_bank[0].i_bank.mem[r / 4];
        1: got = i_vrf.g_bank[1].i_bank.mem[r / 4];
        2: got = i_vrf.g_bank[2].i_bank.mem[r / 4];
        default: got = i_vrf.g_bank[3].i_bank.mem[r / 4];
      endcase
      check(got == model[r], $sformatf("v%0d final contents", r));
    end
    check(i_vrf.rd_locks[0] == 0 && i_vrf.wr_locks[0] == 0, "no lock left when idle");
    check(n_chain > 0, "chaining happened");
    check(n_wait > 0, "lock wait happened");
    check(reports > 0, "instructions reported");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
