// addr_generator: read/write address sequencer of the block interleaver.
//
// Drives the interleaver memory through one block in two phases and tells it
// which phase it is in (sel). A `start` pulse in idle takes the configuration
// (mode, modulation type, code rate, depth index): the depth table turns it
// into r = Ncbps/16 rows; an unlisted configuration is refused with a one-cycle
// cfg_err pulse. Then:
//   write phase (sel = 0): in_ready is high; each cycle with in_valid writes
//     one bit, Ncbps bits in all;
//   read phase (sel = 1): one read per clock for Ncbps cycles; `done` is high
//     with the last read.
// The address core produces the interleaver address kn and the linear address
// n of every bit. Interleave mode writes bit n at kn and reads linearly, so
// the memory holds and returns the permuted block; deinterleave mode writes
// linearly and reads at kn, which applies the inverse permutation.
// The core is restarted for the read phase in the cycle of the last write, so
// the phases follow each other with no idle cycle: 2*Ncbps cycles per block
// with an input that never stalls. Addresses are combinational from registers.
// That one generator gives both addresses under a select line follows the
// published design; the two-phase sequencing, the handshake and the mode encoding
// are this design's own choices.
module addr_generator
  import wimax_il_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  mode_t      mode,
  input  mod_t       mod_typ,
  input  rate_t      code_rate,
  input  logic [2:0] depth_idx,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       wr_en,
  output addr_t      wr_addr,
  output logic       rd_en,
  output addr_t      rd_addr,
  output logic       sel,
  output logic       busy,
  output logic       cfg_err,
  output logic       done,
  output addr_t      ncbps
);

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_READ} state_t;

  state_t state;
  mode_t  mode_q;
  mod_t   mod_q;
  row_t   rows_q;

  row_t   rom_rows;
  addr_t  rom_ncbps;
  logic   rom_valid;

  logic   accept, kn_start, kn_step, kn_busy, kn_last;
  mod_t   kn_mod;
  row_t   kn_rows;
  addr_t  kn, lin;
  col_t   col_i;
  row_t   row_j;

  depth_rom u_rom (
    .mod_typ, .code_rate, .depth_idx,
    .rows(rom_rows), .ncbps(rom_ncbps), .valid(rom_valid)
  );

  assign accept  = (state == S_IDLE) && start && rom_valid;
  assign cfg_err = (state == S_IDLE) && start && !rom_valid;

  assign in_ready = (state == S_WRITE);
  assign wr_en    = in_ready && in_valid;
  assign rd_en    = (state == S_READ);
  assign sel      = (state == S_READ);
  assign busy     = (state != S_IDLE);
  assign done     = rd_en && kn_last;

  assign kn_start = accept || (wr_en && kn_last);
  assign kn_step  = wr_en || rd_en;
  assign kn_mod   = (state == S_IDLE) ? mod_typ  : mod_q;
  assign kn_rows  = (state == S_IDLE) ? rom_rows : rows_q;

  assign wr_addr = (mode_q == MODE_INTERLEAVE) ? kn  : lin;
  assign rd_addr = (mode_q == MODE_INTERLEAVE) ? lin : kn;

  kn_gen u_kn (
    .clk, .rst_n, .start(kn_start), .mod_typ(kn_mod), .rows(kn_rows),
    .step(kn_step), .busy(kn_busy), .last(kn_last),
    .i(col_i), .j(row_j), .kn, .lin
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      mode_q <= MODE_INTERLEAVE;
      mod_q  <= MOD_QPSK;
      rows_q <= '0;
      ncbps  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (accept) begin
          state  <= S_WRITE;
          mode_q <= mode;
          mod_q  <= mod_typ;
          rows_q <= rom_rows;
          ncbps  <= rom_ncbps;
        end
        S_WRITE: if (wr_en && kn_last) state <= S_READ;
        S_READ:  if (kn_last)          state <= S_IDLE;
        default:                       state <= S_IDLE;
      endcase
    end
  end

  // The address core runs whenever the sequencer is outside idle.
  a_core_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> kn_busy);
  // The row/column position is consistent with the linear address.
  a_lin: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (lin == addr_t'(row_j) * addr_t'(D) + addr_t'(col_i)));

endmodule
