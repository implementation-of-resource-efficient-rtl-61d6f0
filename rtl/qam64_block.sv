// qam64_block: interleaver address for 64-QAM.
//
// For 64-QAM (s = 3) the second permutation step rotates each group of three
// rows by the column index modulo 3 (r = Ncbps/d is a multiple of 3 for every
// 64-QAM depth):
//   i%3 = 0 : kn = r*i + j
//   i%3 = 1 : kn = r*i + (j+2) for j%3 = 0, else r*i + (j-1)
//   i%3 = 2 : kn = r*i + (j-2) for j%3 = 2, else r*i + (j+1)
// Combinational. The case split is the published design's; the residues modulo 3 of
// the small counter values are computed directly here.
module qam64_block
  import wimax_il_pkg::*;
(
  input  row_t  r,
  input  col_t  i,
  input  row_t  j,
  output addr_t kn
);

  logic [1:0] i_m3, j_m3;
  row_t       row;

  assign i_m3 = 2'(i % 3);
  assign j_m3 = 2'(j % 3);

  always_comb begin
    unique case (i_m3)
      2'd1:    row = (j_m3 == 2'd0) ? j + row_t'(2) : j - row_t'(1);
      2'd2:    row = (j_m3 == 2'd2) ? j - row_t'(2) : j + row_t'(1);
      default: row = j;
    endcase
  end

  assign kn = addr_t'(r * i) + addr_t'(row);

endmodule
