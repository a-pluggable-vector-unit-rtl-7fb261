// vrf: multi-banked vector register file with lock-based arbitration.
//
// The 32 vector registers are spread over four single-port (1RW) SRAM
// banks: register r lives in bank r % NR_BANKS, row r / NR_BANKS, so the
// registers of one LMUL group sit in different banks. Each SIMD unit has
// two read channels (its SIMD Read Operands stage, through the RO bus) and
// one write channel (its SIMD Write Back stage, through the WB bus), plus a
// lock port to the VRF allocator (vrf_allocator).
//
// Timing: a request is granted in the cycle it is made (req & gnt). A
// granted read returns its data one cycle later with rvalid. A granted write
// is performed at the end of that cycle; the grant is the write ack and
// releases the unit's write lock on that register.
// Per bank, writes win over reads, and lower units and channels win over
// higher ones. Bank interleaving, two read channels per unit and this fixed
// priority are this design's choices; the four 1RW banks, the RO/WB buses,
// the allocator and the locking protocol follow the source.
//
// Lint reports the unused halves of the register index in the bank/row
// helper functions; each takes only its own bits by design.
// RTL assertions below use disable iff on the asynchronous reset, which
// makes lint report rst_ni as used both synchronously and asynchronously.
module vrf
  import vu_pkg::*;
#(
  parameter int unsigned NR_PORTS = NR_FUS
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // lock port (request bus to the allocator)
  input  logic        lock_req_i [NR_PORTS],
  input  vreg_mask_t  lock_rd_i  [NR_PORTS],
  input  vreg_mask_t  lock_wr_i  [NR_PORTS],
  output logic        lock_gnt_o [NR_PORTS],
  input  vreg_mask_t  rel_rd_i   [NR_PORTS],
  // read channels (RO bus)
  input  logic        rd_req_i   [NR_PORTS][2],
  input  vreg_idx_t   rd_addr_i  [NR_PORTS][2],
  output logic        rd_gnt_o   [NR_PORTS][2],
  output logic        rd_valid_o [NR_PORTS][2],
  output vreg_data_t  rd_data_o  [NR_PORTS][2],
  // write channels (WB bus)
  input  logic        wr_req_i   [NR_PORTS],
  input  vreg_idx_t   wr_addr_i  [NR_PORTS],
  input  vreg_data_t  wr_data_i  [NR_PORTS],
  input  vreg_be_t    wr_be_i    [NR_PORTS],
  output logic        wr_ack_o   [NR_PORTS]
);

  localparam int unsigned ROWS      = NR_VREGS / NR_BANKS;
  localparam int unsigned BANK_BITS = $clog2(NR_BANKS);
  localparam int unsigned ROW_BITS  = $clog2(ROWS);

  vreg_mask_t rd_locks [NR_PORTS];
  vreg_mask_t wr_locks [NR_PORTS];

  vrf_allocator #(.NR_PORTS(NR_PORTS)) i_allocator (
    .clk_i, .rst_ni,
    .lock_req_i, .lock_rd_i, .lock_wr_i, .lock_gnt_o, .rel_rd_i,
    .wr_ack_i   (wr_ack_o),
    .wr_addr_i,
    .rd_locks_o (rd_locks),
    .wr_locks_o (wr_locks)
  );

  // bank side
  logic                bank_en    [NR_BANKS];
  logic                bank_we    [NR_BANKS];
  logic [ROW_BITS-1:0] bank_addr  [NR_BANKS];
  vreg_data_t          bank_wdata [NR_BANKS];
  vreg_be_t            bank_be    [NR_BANKS];
  vreg_data_t          bank_rdata [NR_BANKS];

  function automatic logic [BANK_BITS-1:0] bank_of(input vreg_idx_t r);
    return r[BANK_BITS-1:0];
  endfunction

  function automatic logic [ROW_BITS-1:0] row_of(input vreg_idx_t r);
    return r[REG_BITS-1:BANK_BITS];
  endfunction

  always_comb begin
    for (int p = 0; p < NR_PORTS; p++) begin
      wr_ack_o[p] = 1'b0;
      for (int c = 0; c < 2; c++) rd_gnt_o[p][c] = 1'b0;
    end
    for (int b = 0; b < NR_BANKS; b++) begin
      bank_en[b]    = 1'b0;
      bank_we[b]    = 1'b0;
      bank_addr[b]  = '0;
      bank_wdata[b] = '0;
      bank_be[b]    = '0;
      // WB bus first
      for (int p = 0; p < NR_PORTS; p++) begin
        if (!bank_en[b] && wr_req_i[p] && bank_of(wr_addr_i[p]) == b[BANK_BITS-1:0]) begin
          bank_en[b]    = 1'b1;
          bank_we[b]    = 1'b1;
          bank_addr[b]  = row_of(wr_addr_i[p]);
          bank_wdata[b] = wr_data_i[p];
          bank_be[b]    = wr_be_i[p];
          wr_ack_o[p]   = 1'b1;
        end
      end
      // then the RO bus
      for (int p = 0; p < NR_PORTS; p++) begin
        for (int c = 0; c < 2; c++) begin
          if (!bank_en[b] && rd_req_i[p][c] && bank_of(rd_addr_i[p][c]) == b[BANK_BITS-1:0]) begin
            bank_en[b]     = 1'b1;
            bank_addr[b]   = row_of(rd_addr_i[p][c]);
            rd_gnt_o[p][c] = 1'b1;
          end
        end
      end
    end
  end

  for (genvar b = 0; b < NR_BANKS; b++) begin : g_bank
    vrf_bank #(.ROWS(ROWS), .WIDTH(VLEN)) i_bank (
      .clk_i,
      .en_i    (bank_en[b]),
      .we_i    (bank_we[b]),
      .addr_i  (bank_addr[b]),
      .wdata_i (bank_wdata[b]),
      .be_i    (bank_be[b]),
      .rdata_o (bank_rdata[b])
    );
  end

  // RO bus: route each bank's read data back to the channel it served
  logic [BANK_BITS-1:0] rd_bank_q [NR_PORTS][2];
  logic                 rd_pend_q [NR_PORTS][2];

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int p = 0; p < NR_PORTS; p++)
        for (int c = 0; c < 2; c++) begin
          rd_pend_q[p][c] <= 1'b0;
          rd_bank_q[p][c] <= '0;
        end
    end else begin
      for (int p = 0; p < NR_PORTS; p++)
        for (int c = 0; c < 2; c++) begin
          rd_pend_q[p][c] <= rd_gnt_o[p][c];
          if (rd_gnt_o[p][c]) rd_bank_q[p][c] <= bank_of(rd_addr_i[p][c]);
        end
    end
  end

  for (genvar p = 0; p < NR_PORTS; p++) begin : g_ro
    for (genvar c = 0; c < 2; c++) begin : g_ch
      assign rd_valid_o[p][c] = rd_pend_q[p][c];
      assign rd_data_o[p][c]  = bank_rdata[rd_bank_q[p][c]];
    end
  end

  // every access must be covered by a lock the unit holds
  for (genvar p = 0; p < NR_PORTS; p++) begin : g_chk
    assert property (@(posedge clk_i) disable iff (!rst_ni)
      wr_req_i[p] |-> wr_locks[p][wr_addr_i[p]])
      else $error("VRF write of v%0d without write lock", wr_addr_i[p]);
    for (genvar c = 0; c < 2; c++) begin : g_ch
      assert property (@(posedge clk_i) disable iff (!rst_ni)
        rd_req_i[p][c] |-> rd_locks[p][rd_addr_i[p][c]])
        else $error("VRF read of v%0d without read lock", rd_addr_i[p][c]);
    end
  end

endmodule
