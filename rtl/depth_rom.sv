// depth_rom: permitted interleaver depths of IEEE 802.16e.
//
// Maps a modulation type, a code rate and a depth index to the interleaver
// depth Ncbps and to the number of matrix rows r = Ncbps/16. The permitted
// depths are (index 0 first):
//   QPSK   1/2 : 96 192 288 384 480 576     QPSK   3/4 : 144 288 432 576
//   16-QAM 1/2 : 192 384 576                16-QAM 3/4 : 288 576
//   64-QAM 1/2 : 288 576                    64-QAM 2/3 : 384
//   64-QAM 3/4 : 432
// Every list holds the multiples of its first depth up to 576, so the table is
// stored as the first row count and the number of entries; r = base*(idx+1).
// Any other combination (a modulation/rate pair not listed, or an index past
// the end of the list) gives valid = 0. Combinational.
// The depths are the published design's; selecting among them by an index is this
// design's own choice.
module depth_rom
  import wimax_il_pkg::*;
(
  input  mod_t       mod_typ,
  input  rate_t      code_rate,
  input  logic [2:0] depth_idx,
  output row_t       rows,
  output addr_t      ncbps,
  output logic       valid
);

  row_t       base;   // rows of the smallest depth in the list
  logic [2:0] count;  // number of depths in the list

  always_comb begin
    base  = '0;
    count = '0;
    unique case ({mod_typ, code_rate})
      {MOD_QPSK,  RATE_1_2}: begin base = row_t'(6);  count = 3'd6; end
      {MOD_QPSK,  RATE_3_4}: begin base = row_t'(9);  count = 3'd4; end
      {MOD_16QAM, RATE_1_2}: begin base = row_t'(12); count = 3'd3; end
      {MOD_16QAM, RATE_3_4}: begin base = row_t'(18); count = 3'd2; end
      {MOD_64QAM, RATE_1_2}: begin base = row_t'(18); count = 3'd2; end
      {MOD_64QAM, RATE_2_3}: begin base = row_t'(24); count = 3'd1; end
      {MOD_64QAM, RATE_3_4}: begin base = row_t'(27); count = 3'd1; end
      default:               begin base = '0;         count = 3'd0; end
    endcase
  end

  assign valid = depth_idx < count;
  assign rows  = valid ? row_t'(base * (row_t'(depth_idx) + row_t'(1))) : '0;
  assign ncbps = addr_t'(rows) * addr_t'(D);

endmodule
