// interleaver_memory: bit-addressable block memory of the interleaver.
//
// DEPTH one-bit words with one synchronous write port and one synchronous read
// port. A write stores wr_data at wr_addr on the clock edge with wr_en high; a
// read with rd_en high returns the bit at rd_addr on rd_data after that edge
// (one cycle latency) and holds it otherwise. A read and a write of the same
// address in one cycle return the old bit. The contents are not reset; the
// read data register is.
// The bit-addressable memory of Ncbps_max = 576 bits follows the published design; the
// port arrangement and the one-cycle read latency are this design's choice.
module interleaver_memory #(
  parameter int unsigned DEPTH = 576
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic                     wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic                     rd_data
);

  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_data <= 1'b0;
    else if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
