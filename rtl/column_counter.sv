// column_counter: column index i of the interleaver matrix, 0 .. D-1.
//
// The address generator walks the matrix row by row; the column index is the
// fast index and steps once per generated address. It counts up while `en` is
// high and wraps from D-1 to 0; `wrap` is high (combinationally) in the cycle
// in which a step takes the counter from D-1 back to 0, and advances the row
// counter. `clear` (synchronous, priority over `en`) returns it to 0; the
// asynchronous active-low reset does the same.
// The column count D = 16 is the published design's; the clear/enable interface is
// this design's own choice.
module column_counter #(
  parameter int unsigned D = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 en,
  output logic [$clog2(D)-1:0] i,
  output logic                 wrap
);

  localparam logic [$clog2(D)-1:0] LAST = $clog2(D)'(D - 1);

  assign wrap = en && !clear && (i == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      i <= '0;
    else if (clear)  i <= '0;
    else if (en)     i <= (i == LAST) ? '0 : i + 1'b1;
  end

endmodule
