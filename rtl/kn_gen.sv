// kn_gen: interleaver address generator core without floor functions.
//
// Generates, one per clock, the interleaver address kn of every bit of an
// Ncbps-bit block, in input order. Input bit n sits in row j = n/16 and
// column i = n%16 of the interleaver matrix; a column counter (fast index)
// and a row counter (slow index, up to r = Ncbps/16 rows) walk that matrix.
// Three modulation blocks (QPSK, 16-QAM, 64-QAM) each form kn from r, i and j
// with a multiply-add and a small row correction, and a multiplexer selects
// the one for the modulation type. The linear address n = 16*j + i is given
// too; it is the concatenation {j, i}.
//
// Interface: a `start` pulse latches mod_typ and rows (r) and clears the
// counters; `busy` is then high and kn, lin, i and j describe the current bit.
// Each cycle with busy and `step` high moves to the next bit; `last` flags the
// final bit of the block, and stepping past it drops busy (start has priority
// over step, so a new block may begin in the cycle the old one ends).
// Timing: the outputs are combinational from the counter registers; one
// address per clock while step is held high, Ncbps cycles per block.
// The counters, the three blocks and the multiplexer are the published design's; each
// block carries its own multiplier here, and the start/step handshake is this
// design's own choice.
module kn_gen
  import wimax_il_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  mod_t  mod_typ,
  input  row_t  rows,
  input  logic  step,
  output logic  busy,
  output logic  last,
  output col_t  i,
  output row_t  j,
  output addr_t kn,
  output addr_t lin
);

  mod_t  mod_q;
  row_t  rows_q;
  logic  advance, col_wrap, row_wrap;
  addr_t kn_qpsk, kn_16qam, kn_64qam;

  assign advance = busy && step && !start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      mod_q  <= MOD_QPSK;
      rows_q <= '0;
    end else if (start) begin
      busy   <= 1'b1;
      mod_q  <= mod_typ;
      rows_q <= rows;
    end else if (row_wrap) begin
      busy   <= 1'b0;
    end
  end

  column_counter #(.D(D)) u_col (
    .clk, .rst_n, .clear(start), .en(advance), .i, .wrap(col_wrap)
  );

  row_counter #(.ROWS_MAX(ROWS_MAX)) u_row (
    .clk, .rst_n, .clear(start), .en(col_wrap), .rows(rows_q), .j, .wrap(row_wrap)
  );

  qpsk_block  u_qpsk  (.r(rows_q), .i, .j, .kn(kn_qpsk));
  qam16_block u_qam16 (.r(rows_q), .i, .j, .kn(kn_16qam));
  qam64_block u_qam64 (.r(rows_q), .i, .j, .kn(kn_64qam));

  always_comb begin
    unique case (mod_q)
      MOD_16QAM: kn = kn_16qam;
      MOD_64QAM: kn = kn_64qam;
      default:   kn = kn_qpsk;
    endcase
  end

  assign lin  = addr_t'({j, i});
  assign last = busy && (i == col_t'(D - 1)) && (j == rows_q - 1'b1);

endmodule
