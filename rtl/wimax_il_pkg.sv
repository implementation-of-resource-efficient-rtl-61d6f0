// wimax_il_pkg: types and constants shared by the WiMAX (IEEE 802.16e) channel
// interleaver address generator and its interleaver memory.
//
// The block interleaver is organised as a matrix of D = 16 columns and
// R = Ncbps/D rows; Ncbps, the interleaver depth, ranges from 96 to 576 bits.
// The modulation encoding follows the select input of the address multiplexer
// (0 = QPSK, 1 = 16-QAM, 2 = 64-QAM). The 3-bit code-rate encoding (000 = 1/2)
// and the two operating modes are this design's own choice.
package wimax_il_pkg;

  // Number of interleaver columns d (the standard allows 16 or 12; 16 is used).
  localparam int unsigned D          = 16;
  // Largest interleaver depth Ncbps of IEEE 802.16e, in bits.
  localparam int unsigned NCBPS_MAX  = 576;
  // Largest number of rows, NCBPS_MAX / D.
  localparam int unsigned ROWS_MAX   = NCBPS_MAX / D;
  localparam int unsigned COL_W      = $clog2(D);
  localparam int unsigned ROW_W      = $clog2(ROWS_MAX);
  localparam int unsigned ADDR_W     = $clog2(NCBPS_MAX);

  typedef logic [COL_W-1:0]  col_t;
  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Modulation type, the select of the address multiplexer.
  typedef enum logic [1:0] {
    MOD_QPSK  = 2'd0,
    MOD_16QAM = 2'd1,
    MOD_64QAM = 2'd2
  } mod_t;

  // Code rate.
  typedef enum logic [2:0] {
    RATE_1_2 = 3'd0,
    RATE_2_3 = 3'd1,
    RATE_3_4 = 3'd2
  } rate_t;

  // Interleave: bit k of the block is written at address kn and the memory is
  // read in linear order. Deinterleave: the block is written in linear order
  // and read at address kn, which applies the inverse permutation.
  typedef enum logic {
    MODE_INTERLEAVE   = 1'b0,
    MODE_DEINTERLEAVE = 1'b1
  } mode_t;

endpackage
