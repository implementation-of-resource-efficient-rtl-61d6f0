// tb_wimax_interleaver: end-to-end test of the interleaver at its full size.
//
// For every permitted depth, modulation and code rate it interleaves a random
// block and checks out[jk] = in[k] with jk from the interleaver formula; it
// deinterleaves a random block and checks out[kj] = in[j] with kj from the
// deinterleaver formula; and it deinterleaves the interleaved block and
// checks the original comes back. The input stalls at random. It checks the
// block timing (Ncbps output bits on consecutive clocks, the first one clock
// after the last input, out_last on the final bit) and counts how often each
// mechanism ran: both modes, all three modulations, input stalls, refused
// configurations and starts ignored during a block. One that never ran is a
// failure.
module tb_wimax_interleaver;
  import wimax_il_pkg::*;
  import tb_wimax_ref_pkg::*;
  logic       clk = 0, rst_n = 0, start = 0, in_bit = 0, in_valid = 0;
  mode_t      mode = MODE_INTERLEAVE;
  mod_t       mod_typ = MOD_QPSK;
  rate_t      code_rate = RATE_1_2;
  logic [2:0] depth_idx = '0;
  logic       in_ready, out_bit, out_valid, out_last, busy, cfg_err;
  addr_t      ncbps;
  int checks = 0, failures = 0;
  int n_mode [2], n_mod [3], n_stall = 0, n_refused = 0, n_ignored = 0;

  wimax_interleaver dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Sends one block through the design and collects the output block.
  task automatic run_block(cfg_t cf, mode_t md, input bit din [], output bit dout []);
    int n = cf.ncbps, k = 0, latency = 0;
    dout = new[n];
    @(negedge clk);
    start = 1; mode = md; mod_typ = mod_t'(cf.mod_typ);
    code_rate = rate_t'(cf.code_rate); depth_idx = 3'(cf.idx);
    @(negedge clk);
    start = 0;
    n_mode[md]++;
    unique case (cf.mod_typ)
      0: n_mod[0]++;
      1: n_mod[1]++;
      default: n_mod[2]++;
    endcase
    while (k < n) begin
      in_valid = ($urandom % 5) != 0;
      in_bit   = in_valid ? din[k] : 1'($urandom);
      if (($urandom % 40) == 0) begin start = 1; n_ignored++; end
      #1;
      check(in_ready, "in_ready low during the write phase");
      if (!in_valid) n_stall++;
      if (in_valid) k++;
      @(negedge clk);
      start = 0;
    end
    in_valid = 0;
    while (!out_valid && latency < 10) begin
      latency++;
      @(negedge clk);
    end
    check(latency == 1, $sformatf("first output %0d cycles after the last input", latency));
    for (k = 0; k < n; k++) begin
      check(out_valid, $sformatf("out_valid low at output bit %0d of %0d", k, n));
      check(out_last == (k == n - 1), "out_last flag");
      dout[k] = out_bit;
      @(negedge clk);
    end
    check(!out_valid && !busy, "idle after the block");
  endtask

  initial begin
    bit a [], b [], c [];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Refused configurations.
    for (int x = 0; x < 2; x++) begin
      @(negedge clk);
      start = 1; mod_typ = (x == 0) ? MOD_64QAM : MOD_QPSK;
      code_rate = RATE_2_3; depth_idx = (x == 0) ? 3'd1 : 3'd0;
      #1;
      check(cfg_err, "unlisted configuration not refused");
      if (cfg_err) n_refused++;
      @(negedge clk);
      start = 0;
      #1;
      check(!busy, "refused configuration started a block");
    end
    for (int x = 0; x < NCFG; x++) begin
      automatic cfg_t cf = cfg_at(x);
      automatic int n = cf.ncbps, s = ref_s(cf.mod_typ);
      a = new[n];
      foreach (a[k]) a[k] = 1'($urandom);
      // Interleave: input bit k lands at output position jk.
      run_block(cf, MODE_INTERLEAVE, a, b);
      check(int'(ncbps) == n, "ncbps");
      for (int k = 0; k < n; k++)
        check(b[ref_jk(k, n, s)] == a[k], $sformatf("N=%0d mod %0d interleave bit %0d", n, cf.mod_typ, k));
      // Deinterleave the interleaved block: the original returns.
      run_block(cf, MODE_DEINTERLEAVE, b, c);
      for (int k = 0; k < n; k++)
        check(c[k] == a[k], $sformatf("N=%0d mod %0d round trip bit %0d", n, cf.mod_typ, k));
      // Deinterleave a fresh block: received bit j lands at position kj.
      foreach (a[k]) a[k] = 1'($urandom);
      run_block(cf, MODE_DEINTERLEAVE, a, c);
      for (int j = 0; j < n; j++)
        check(c[ref_kj(j, n, s)] == a[j], $sformatf("N=%0d mod %0d deinterleave bit %0d", n, cf.mod_typ, j));
    end
    $display("mechanisms: interleave=%0d deinterleave=%0d qpsk=%0d 16qam=%0d 64qam=%0d stall=%0d refused=%0d ignored_start=%0d",
             n_mode[0], n_mode[1], n_mod[0], n_mod[1], n_mod[2], n_stall, n_refused, n_ignored);
    check(n_mode[0] > 0, "interleave mode never ran");
    check(n_mode[1] > 0, "deinterleave mode never ran");
    for (int m = 0; m < 3; m++) check(n_mod[m] > 0, $sformatf("modulation %0d never ran", m));
    check(n_stall > 0, "input never stalled");
    check(n_refused > 0, "no configuration refused");
    check(n_ignored > 0, "no start ignored during a block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
