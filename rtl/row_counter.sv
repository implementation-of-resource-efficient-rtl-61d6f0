// row_counter: row index j of the interleaver matrix, 0 .. rows-1.
//
// The number of rows r = Ncbps/d depends on the interleaver depth and is an
// input (6 .. 36 for the depths of IEEE 802.16e). The counter steps when `en`
// is high (the column counter wraps) and returns to 0 after rows-1; `wrap` is
// high in the cycle of that last step, which ends the block. `clear` is
// synchronous and has priority; the asynchronous active-low reset clears it.
// Counting up to r = Ncbps/d follows the published design; the interface is this
// design's own choice. `rows` must be at least 1 and stable while counting.
module row_counter #(
  parameter int unsigned ROWS_MAX = 36
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clear,
  input  logic                        en,
  input  logic [$clog2(ROWS_MAX)-1:0] rows,
  output logic [$clog2(ROWS_MAX)-1:0] j,
  output logic                        wrap
);

  logic at_last;
  assign at_last = (j == rows - 1'b1);
  assign wrap    = en && !clear && at_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      j <= '0;
    else if (clear)  j <= '0;
    else if (en)     j <= at_last ? '0 : j + 1'b1;
  end

endmodule
