// simd_write_back: SIMD Write Back (WB) stage of one functional unit.
//
// Holds one executed micro-op. If the micro-op writes a vector register it
// first writes the result to the VRF through the WB bus, only the bytes of
// active elements (be); the VRF's ack also releases the write lock. If it
// is the last micro-op of its instruction it then asks the vector write
// back arbiter (req/gnt) to report the instruction as finished, with the
// scalar result when the instruction has one (vmv.x.s) and a request to
// clear vstart. `retire` pulses when the micro-op leaves the stage.
// Write then report, one micro-op at a time, is this design's choice; the
// stage's two duties and the release on ack follow the source.
module simd_write_back
  import vu_pkg::*;
(
  input  logic            clk_i,
  input  logic            rst_ni,
  // from the execute stage
  input  logic            in_valid_i,
  output logic            in_ready_o,
  input  uop_t            in_uop_i,
  input  vreg_data_t      in_result_i,
  input  logic [XLEN-1:0] in_scalar_i,
  input  exception_t      in_ex_i,
  // WB bus to the VRF
  output logic            wr_req_o,
  output vreg_idx_t       wr_addr_o,
  output vreg_data_t      wr_data_o,
  output vreg_be_t        wr_be_o,
  input  logic            wr_ack_i,
  // to the vector write back arbiter
  output logic            vwb_req_o,
  output wb_req_t         vwb_data_o,
  input  logic            vwb_gnt_i,
  // micro-op leaves the unit
  output logic            retire_o,
  output uop_t            retire_uop_o
);

  logic            valid_q, wr_done_q;
  uop_t            uop_q;
  vreg_data_t      res_q;
  logic [XLEN-1:0] scalar_q;
  exception_t      ex_q;
  logic            written, done;

  assign written   = wr_done_q || !uop_q.writes_vd;
  assign wr_req_o  = valid_q && uop_q.writes_vd && !wr_done_q;
  assign wr_addr_o = uop_q.vd;
  assign wr_data_o = res_q;
  assign wr_be_o   = uop_q.be;

  assign vwb_req_o = valid_q && uop_q.last && written;
  always_comb begin
    vwb_data_o                = '0;
    vwb_data_o.trans_id       = uop_q.trans_id;
    vwb_data_o.result         = uop_q.writes_scalar ? scalar_q : '0;
    vwb_data_o.ex             = ex_q;
    vwb_data_o.csr.vstart_clr = 1'b1;
  end

  assign done         = valid_q && written && (!uop_q.last || vwb_gnt_i);
  assign in_ready_o   = !valid_q || done;
  assign retire_o     = done;
  assign retire_uop_o = uop_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_q   <= 1'b0;
      wr_done_q <= 1'b0;
      uop_q     <= '0;
      res_q     <= '0;
      scalar_q  <= '0;
      ex_q      <= '0;
    end else begin
      if (wr_ack_i) wr_done_q <= 1'b1;
      if (in_ready_o) begin
        valid_q   <= in_valid_i;
        wr_done_q <= 1'b0;
        if (in_valid_i) begin
          uop_q    <= in_uop_i;
          res_q    <= in_result_i;
          scalar_q <= in_scalar_i;
          ex_q     <= in_ex_i;
        end
      end
    end
  end

  assert property (@(posedge clk_i) disable iff (!rst_ni) vwb_req_o && !vwb_gnt_i |=> vwb_req_o && $stable(vwb_data_o))
    else $error("write-back request dropped before its grant");

endmodule
