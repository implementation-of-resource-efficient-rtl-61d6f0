// wimax_interleaver: IEEE 802.16e channel interleaver / deinterleaver.
//
// A block interleaver built from an address generator and a bit-addressable
// interleaver memory of 576 bits. The address generator computes the
// interleaver permutation of the standard (two steps with floor functions)
// with counters, one multiplier per modulation and a small row correction,
// and no divider. In interleave mode the raw bits of a block are written at
// their permuted addresses and read back in order; in deinterleave mode they
// are written in order and read back at the permuted addresses, which undoes
// the interleaver.
//
// Interface: pulse `start` while idle with mode, mod_typ, code_rate and
// depth_idx set (see depth_rom for the permitted depths; cfg_err pulses for an
// unlisted one). Then feed Ncbps bits on in_bit with in_valid while in_ready
// is high (in_valid may drop for any number of cycles). The block leaves on
// out_bit with out_valid, one bit per clock with no stall, starting one cycle
// after the last input bit was taken; out_last marks its final bit.
// Timing: Ncbps write cycles plus Ncbps read cycles; output latency one cycle
// after the read. The next block may start once busy is low.
// The address generator and memory are the published design's; the single-buffer
// two-phase operation and the handshake are this design's own choices.
module wimax_interleaver
  import wimax_il_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  mode_t      mode,
  input  mod_t       mod_typ,
  input  rate_t      code_rate,
  input  logic [2:0] depth_idx,
  input  logic       in_bit,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       out_bit,
  output logic       out_valid,
  output logic       out_last,
  output logic       busy,
  output logic       cfg_err,
  output addr_t      ncbps
);

  logic  wr_en, rd_en, sel, done;
  addr_t wr_addr, rd_addr;

  addr_generator u_agen (
    .clk, .rst_n, .start, .mode, .mod_typ, .code_rate, .depth_idx,
    .in_valid, .in_ready, .wr_en, .wr_addr, .rd_en, .rd_addr, .sel,
    .busy, .cfg_err, .done, .ncbps
  );

  interleaver_memory #(.DEPTH(NCBPS_MAX)) u_mem (
    .clk, .rst_n,
    .wr_en, .wr_addr, .wr_data(in_bit),
    .rd_en(rd_en && sel), .rd_addr, .rd_data(out_bit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= rd_en;
      out_last  <= done;
    end
  end

endmodule
