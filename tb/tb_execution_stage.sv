// tb_execution_stage: both SIMD units around the shared register file.
// Unit 0 (ALU) first fills all 32 registers; then both units run random
// streams at once, the ALU on v0-v15 and the multiplier on v16-v31 (the
// dispatcher keeps units apart; here the partition does). A sequential
// model per unit predicts the final register file. Bank conflicts between
// the units and instruction reports from both are counted and must occur.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_execution_stage;
  import vu_pkg::*;
  import vtb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  logic uv [2], ur [2], vreq [2], vgnt [2], ret [2]; uop_t u [2], ru [2]; wb_req_t vdata [2];
  execution_stage dut (.clk_i(clk), .rst_ni(rst_n), .uop_valid_i(uv), .uop_ready_o(ur), .uop_i(u),
    .vwb_req_o(vreq), .vwb_data_o(vdata), .vwb_gnt_i(vgnt), .retire_o(ret), .retire_uop_o(ru));
  vreg_data_t model [32];
  vop_e aops [13] = '{VADD, VSUB, VRSUB, VAND, VOR, VXOR, VSLL, VSRL, VSRA, VMINU, VMIN, VMAXU, VMAX};
  vop_e mops [3] = '{VMUL, VMULH, VMULHU};
  int n [2], reports [2], n_conf = 0, retired = 0;
  function automatic void model_uop(input uop_t x);
    int w; vreg_data_t res;
    w = 8 << x.sew; res = '0;
    for (int e = 0; e < VLEN / w; e++)
      res |= VLEN'(ref_elem(x.op, x.use_vs1 ? zx(64'(model[x.vs1] >> (e * w)), w) : x.scalar,
                            zx(64'(model[x.vs2] >> (e * w)), w), w)) << (e * w);
    for (int b = 0; b < VLENB; b++) if (x.be[b]) model[x.vd][8*b +: 8] = res[8*b +: 8];
  endfunction
  function automatic uop_t rand_uop(input int f);
    uop_t x; int base;
    x = '0; base = 16 * f;
    x.op = (f == 0) ? aops[$urandom_range(0, 12)] : mops[$urandom_range(0, 2)];
    x.sew = vsew_e'($urandom_range(0, 3));
    x.vd = vreg_idx_t'(base + $urandom_range(0, 15)); x.vs1 = vreg_idx_t'(base + $urandom_range(0, 15));
    x.vs2 = vreg_idx_t'(base + $urandom_range(0, 15));
    x.use_vs1 = $urandom_range(0, 1); x.use_vs2 = 1; x.writes_vd = 1; x.scalar = {$urandom, $urandom};
    x.be = ($urandom_range(0, 3) == 0) ? vreg_be_t'((1 << $urandom_range(0, VLENB - 1)) - 1) : '1;
    x.last = $urandom_range(0, 1);
    return x;
  endfunction
  always @(posedge clk) if (rst_n) begin
    for (int f = 0; f < 2; f++) begin
      if (vreq[f] && vgnt[f]) reports[f]++;
      if (ret[f]) retired++;
    end
    for (int c = 0; c < 2; c++)
      if ((dut.rd_req[1][c] && !dut.rd_gnt[1][c]) || (dut.wr_req[1] && !dut.wr_ack[1])) n_conf++;
  end
  initial begin
    for (int f = 0; f < 2; f++) begin uv[f] = 0; u[f] = '0; vgnt[f] = 0; n[f] = 0; reports[f] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    // fill
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      while (!ur[0]) @(negedge clk);
      uv[0] = 1; u[0] = '0; u[0].op = VMV; u[0].vd = vreg_idx_t'(r); u[0].writes_vd = 1; u[0].sew = SEW64;
      u[0].scalar = {$urandom, $urandom}; u[0].be = '1; u[0].last = 0;
      model_uop(u[0]);
      @(posedge clk); #1; uv[0] = 0;
    end
    repeat (40) begin @(negedge clk); vgnt[0] = vreq[0]; end
    // parallel streams
    while (n[0] < 400 || n[1] < 400) begin
      @(negedge clk);
      for (int f = 0; f < 2; f++) begin
        vgnt[f] = vreq[f] && $urandom_range(0, 2) != 0;
        if (uv[f] && ur[f]) begin model_uop(u[f]); n[f]++; end
        if (!uv[f] || ur[f]) begin
          uv[f] = n[f] < 400 && $urandom_range(0, 3) != 0;
          u[f] = uv[f] ? rand_uop(f) : '0;
          u[f].trans_id = trans_id_t'(n[f]);
        end
      end
    end
    for (int f = 0; f < 2; f++) uv[f] = 0;
    repeat (300) begin @(negedge clk); vgnt[0] = vreq[0]; vgnt[1] = vreq[1]; end
    for (int r = 0; r < 8; r++) begin
      check(dut.i_vrf.g_bank[0].i_bank.mem[r] == model[4 * r + 0], "bank 0 contents");
      check(dut.i_vrf.g_bank[1].i_bank.mem[r] == model[4 * r + 1], "bank 1 contents");
      check(dut.i_vrf.g_bank[2].i_bank.mem[r] == model[4 * r + 2], "bank 2 contents");
      check(dut.i_vrf.g_bank[3].i_bank.mem[r] == model[4 * r + 3], "bank 3 contents");
    end
    check(retired == 32 + 800, "every micro-op retired once");
    check(reports[0] > 0 && reports[1] > 0, "both units reported instructions");
    check(n_conf > 0, "bank conflicts between the units");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
