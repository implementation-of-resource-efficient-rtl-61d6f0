// qam16_block: interleaver address for 16-QAM.
//
// For 16-QAM (s = 2) the second permutation step swaps neighbouring rows in
// every odd column: even columns give kn = r*i + j, odd columns give
// r*i + (j+1) for even j and r*i + (j-1) for odd j. This holds because r =
// Ncbps/d is even for every 16-QAM depth, so it needs no floor function.
// Combinational; the swap reduces to inverting bit 0 of j in odd columns.
// The formula is the published design's; the bit-0 form is this design's own.
module qam16_block
  import wimax_il_pkg::*;
(
  input  row_t  r,
  input  col_t  i,
  input  row_t  j,
  output addr_t kn
);

  row_t row;

  always_comb begin
    row = j;
    // Odd column: j+1 for even j, j-1 for odd j.
    if (i[0]) row[0] = ~j[0];
  end

  assign kn = addr_t'(r * i) + addr_t'(row);

endmodule
