// tb_vector_write_back: static priority. With random request patterns the
// granted requester is the lowest-numbered one, its payload is on the
// port, and nothing is granted without a request; also with two ports.
//
// Stimulus, timing of the drivers and the reference model are this
// testbench's own; the checked behaviour is the block's as described in
// its own header. Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_vector_write_back;
  import vu_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  logic req [4], gnt [4], v1 [1]; wb_req_t d [4], o1 [1];
  logic gnt2 [4], v2 [2]; wb_req_t o2 [2];
  vector_write_back #(.NR_REQ(4), .NR_WB_PORTS(1)) dut (.req_i(req), .data_i(d), .gnt_o(gnt), .wb_valid_o(v1), .wb_data_o(o1));
  vector_write_back #(.NR_REQ(4), .NR_WB_PORTS(2)) dut2 (.req_i(req), .data_i(d), .gnt_o(gnt2), .wb_valid_o(v2), .wb_data_o(o2));
  initial begin
    for (int i = 0; i < 500; i++) begin
      int first, second;
      first = -1; second = -1;
      for (int r = 0; r < 4; r++) begin
        req[r] = $urandom_range(0, 1); d[r] = '0; d[r].trans_id = trans_id_t'(r); d[r].result = {$urandom, $urandom};
        if (req[r] && first < 0) first = r; else if (req[r] && second < 0) second = r;
      end
      #1;
      for (int r = 0; r < 4; r++) begin
        check(gnt[r] == (r == first), "one port: highest priority granted");
        check(gnt2[r] == (r == first || r == second), "two ports: two highest granted");
      end
      check(v1[0] == (first >= 0), "port enable");
      if (first >= 0) check(o1[0] == d[first], "granted payload on the port");
      if (second >= 0) check(v2[1] && o2[1] == d[second], "second port payload");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
