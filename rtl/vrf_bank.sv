// vrf_bank: one single-port (1RW) SRAM bank of the vector register file.
//
// Each cycle the bank performs either one read or one write. A read of row
// `addr` returns the row on `rdata` in the next cycle. A write stores the
// bytes of `wdata` whose bit in `be` is set; the others keep their value.
// The bank count (four 1RW banks) follows the source; the synchronous
// one-cycle read and the byte enables are this design's choices. Written as
// an array so that a memory compiler macro can replace it.
module vrf_bank #(
  parameter int unsigned ROWS  = 8,
  parameter int unsigned WIDTH = 128
) (
  input  logic                     clk_i,
  input  logic                     en_i,
  input  logic                     we_i,
  input  logic [$clog2(ROWS)-1:0]  addr_i,
  input  logic [WIDTH-1:0]         wdata_i,
  input  logic [WIDTH/8-1:0]       be_i,
  output logic [WIDTH-1:0]         rdata_o
);

  logic [WIDTH-1:0] mem [ROWS];

  always_ff @(posedge clk_i) begin
    if (en_i) begin
      if (we_i) begin
        for (int b = 0; b < WIDTH / 8; b++)
          if (be_i[b]) mem[addr_i][8*b +: 8] <= wdata_i[8*b +: 8];
      end else begin
        rdata_o <= mem[addr_i];
      end
    end
  end

endmodule
