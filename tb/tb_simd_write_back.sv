// tb_simd_write_back: the WB stage writes the result first (waiting for a
// randomly delayed ack, with the micro-op's byte enables), then, for the
// last micro-op of an instruction, reports to the vector write back with the
// scalar result when there is one, and only then retires and takes the next.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_simd_write_back;
  import vu_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  logic iv, ir, wreq, wack, vreq, vgnt, ret; uop_t iu, ru; vreg_data_t ires, wdata; logic [63:0] isc;
  vreg_idx_t waddr; vreg_be_t wbe; wb_req_t vdata; exception_t iex;
  simd_write_back dut (.clk_i(clk), .rst_ni(rst_n), .in_valid_i(iv), .in_ready_o(ir), .in_uop_i(iu),
    .in_result_i(ires), .in_scalar_i(isc), .in_ex_i(iex), .wr_req_o(wreq), .wr_addr_o(waddr),
    .wr_data_o(wdata), .wr_be_o(wbe), .wr_ack_i(wack), .vwb_req_o(vreq), .vwb_data_o(vdata),
    .vwb_gnt_i(vgnt), .retire_o(ret), .retire_uop_o(ru));
  typedef struct { uop_t u; vreg_data_t r; logic [63:0] s; } item_t;
  item_t q [$];
  int sent = 0, done = 0, n_wait = 0;
  logic wrote;
  initial begin
    iv = 0; iu = '0; ires = '0; isc = '0; iex = '0; wack = 0; vgnt = 0; wrote = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    while (done < 500) begin
      @(negedge clk);
      if (!iv || ir) begin
        iv = $urandom_range(0, 1) && sent < 500;
        iu = '0; iu.vd = vreg_idx_t'($urandom_range(0, 31)); iu.writes_vd = $urandom_range(0, 3) != 0;
        iu.writes_scalar = !iu.writes_vd; iu.last = $urandom_range(0, 1) || !iu.writes_vd;
        iu.be = vreg_be_t'($urandom); iu.trans_id = trans_id_t'($urandom);
        ires = {$urandom, $urandom, $urandom, $urandom}; isc = {$urandom, $urandom};
      end
      wack = wreq && $urandom_range(0, 2) == 0;
      vgnt = vreq && $urandom_range(0, 1);
      #1;
      if (q.size() > 0) begin
        item_t it; it = q[0];
        if (wreq) begin
          check(it.u.writes_vd && waddr == it.u.vd && wdata == it.r && wbe == it.u.be, "VRF write of the held micro-op");
          check(!vreq, "report only after the write");
          if (!wack) n_wait++;
        end
        if (vreq) begin
          check(it.u.last && vdata.trans_id == it.u.trans_id && !vdata.ex.valid && vdata.csr.vstart_clr, "report of the last micro-op");
          check(vdata.result == (it.u.writes_scalar ? it.s : 64'd0), "scalar result");
        end
        if (ret) begin
          check(ru == it.u, "retired micro-op");
          check(!it.u.last || vgnt, "retire only once reported");
          void'(q.pop_front()); done++;
        end
      end else check(!wreq && !vreq && !ret, "idle when empty");
      if (iv && ir) begin item_t it; it.u = iu; it.r = ires; it.s = isc; q.push_back(it); sent++; end
      check(q.size() <= 1, "one micro-op at a time");
    end
    check(n_wait > 0, "write waited for its ack");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
