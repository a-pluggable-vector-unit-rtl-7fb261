// vector_write_back: arbiter between the vector unit's result sources and
// the core's write-back port(s).
//
// Requesters are, in falling priority: the vector configuration module,
// the exception module, then SIMD unit 0, 1, ... Each holds req with its
// payload (trans_id, scalar result, exception, vector-CSR controls) until
// it sees gnt in the same cycle. Each cycle the NR_WB_PORTS highest-priority
// requests are granted and driven onto the ports, whose valid bit is the
// port's enable. The request/grant handshake and the static priority
// follow the source; the order of the requesters and one port by default
// are this design's choices.
module vector_write_back
  import vu_pkg::*;
#(
  parameter int unsigned NR_REQ      = 2 + NR_FUS,
  parameter int unsigned NR_WB_PORTS = 1
) (
  input  logic    req_i  [NR_REQ],
  input  wb_req_t data_i [NR_REQ],
  output logic    gnt_o  [NR_REQ],
  output logic    wb_valid_o [NR_WB_PORTS],
  output wb_req_t wb_data_o  [NR_WB_PORTS]
);

  always_comb begin
    int unsigned n;
    n = 0;
    for (int p = 0; p < NR_WB_PORTS; p++) begin
      wb_valid_o[p] = 1'b0;
      wb_data_o[p]  = '0;
    end
    for (int r = 0; r < NR_REQ; r++) begin
      gnt_o[r] = 1'b0;
      if (req_i[r] && n < NR_WB_PORTS) begin
        gnt_o[r]      = 1'b1;
        wb_valid_o[n] = 1'b1;
        wb_data_o[n]  = data_i[r];
        n++;
      end
    end
  end

endmodule
