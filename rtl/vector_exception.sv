// vector_exception: turns decoder exceptions into write-back requests.
//
// Accepts an instruction the decoder marked illegal (valid/ready), and
// holds a write-back request carrying an illegal-instruction exception
// (cause 2, tval = the instruction bits) for its trans_id until the vector
// write back arbiter grants it. It takes a new instruction only when
// empty, so `ready` also stalls the sequencer behind a pending exception.
// That the sequencer has a module of its own for exceptions follows the
// source; the cause and tval values follow the RISC-V privileged spec.
//
// Lint reports most of the decoded instruction as unused: an exception
// needs only the trans_id and the raw instruction bits.
module vector_exception
  import vu_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  logic     valid_i,
  output logic     ready_o,
  input  decoded_t dec_i,
  output logic     vwb_req_o,
  output wb_req_t  vwb_data_o,
  input  logic     vwb_gnt_i
);

  logic    pend_q;
  wb_req_t data_q;

  assign ready_o    = !pend_q;
  assign vwb_req_o  = pend_q;
  assign vwb_data_o = data_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pend_q <= 1'b0;
      data_q <= '0;
    end else if (valid_i && ready_o) begin
      pend_q          <= 1'b1;
      data_q          <= '0;
      data_q.trans_id <= dec_i.trans_id;
      data_q.ex.valid <= 1'b1;
      data_q.ex.cause <= CAUSE_ILLEGAL_INSTR;
      data_q.ex.tval  <= XLEN'(dec_i.instr);
    end else if (vwb_gnt_i) begin
      pend_q <= 1'b0;
    end
  end

endmodule
