// dram_addr_gen: bank/row/column address of one 16-bit beat of a complex word.
//
// Every DRAM channel holds one complex word (four 16-bit columns) per 64-point
// transform slot f. The slot is mapped as
//   bank = f mod 4,  column = 4*((f / 4) mod 64) + beat,  row = row_base + f / 256.
// Consecutive slots therefore cycle through the four banks, and a bank changes
// row only between slots f and f+4, so at least four 64-point transform cycles
// separate a row change in a bank from that bank's previous access, and the
// precharge/activate is hidden behind the other three banks. This meets the
// rule stated in the source architecture; the mapping itself is this design's.
// Bank, row and column sizes are those of a 64 Mbit x16 DDR SDRAM
// (4 banks x 4096 rows x 256 columns). Combinational.
module dram_addr_gen
  import fft_pkg::*;
(
  input  logic [19:0] slot,
  input  logic [1:0]  beat,
  input  logic [11:0] row_base,
  output dram_addr_t  addr
);
  always_comb begin
    addr.bank = slot[1:0];
    addr.col  = {slot[7:2], beat};
    addr.row  = row_base + slot[19:8];
  end
endmodule
