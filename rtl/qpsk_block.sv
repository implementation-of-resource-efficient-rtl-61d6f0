// qpsk_block: interleaver address for QPSK.
//
// For QPSK (s = 1) the second permutation step of IEEE 802.16e is the
// identity, so the address of the bit in row j and column i of the input
// matrix is kn = r*i + j with r = Ncbps/d rows. Combinational; r, i and j come
// from the row-count register and the column and row counters.
// The formula is the published design's; the port widths are this design's choice.
module qpsk_block
  import wimax_il_pkg::*;
(
  input  row_t  r,
  input  col_t  i,
  input  row_t  j,
  output addr_t kn
);

  assign kn = addr_t'(r * i) + addr_t'(j);

endmodule
