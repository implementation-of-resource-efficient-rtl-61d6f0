// tb_addr_generator: drives the address sequencer through every permitted
// configuration in both modes with a stalling input, and checks the write
// addresses of the write phase and the read addresses of the read phase
// against the interleaver formula, the phase select, the phase lengths
// (Ncbps reads on consecutive clocks), done, and that unlisted configurations
// and a start during a block are refused.
module tb_addr_generator;
  import wimax_il_pkg::*;
  import tb_wimax_ref_pkg::*;
  logic       clk = 0, rst_n = 0, start = 0, in_valid = 0;
  mode_t      mode = MODE_INTERLEAVE;
  mod_t       mod_typ = MOD_QPSK;
  rate_t      code_rate = RATE_1_2;
  logic [2:0] depth_idx = '0;
  logic       in_ready, wr_en, rd_en, sel, busy, cfg_err, done;
  addr_t      wr_addr, rd_addr, ncbps;
  int checks = 0, failures = 0;

  addr_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
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

  task automatic run_block(cfg_t cf, mode_t md);
    int n = cf.ncbps, s = ref_s(cf.mod_typ), k = 0, guard = 0;
    @(negedge clk);
    start = 1; mode = md; mod_typ = mod_t'(cf.mod_typ);
    code_rate = rate_t'(cf.code_rate); depth_idx = 3'(cf.idx);
    #1;
    check(!cfg_err, "cfg_err for a permitted configuration");
    @(negedge clk);
    start = 0;
    check(int'(ncbps) == n, $sformatf("ncbps=%0d expected %0d", ncbps, n));
    // Write phase.
    while (k < n && guard < 4 * n) begin
      in_valid = ($urandom % 4) != 0;
      // A start during a block must be ignored.
      start = ($urandom % 50) == 0;
      #1;
      check(in_ready && !sel && !rd_en && busy, "write phase flags");
      check(wr_en == in_valid, "wr_en follows in_valid");
      if (in_valid) begin
        int e = (md == MODE_INTERLEAVE) ? ref_jk(k, n, s) : k;
        check(int'(wr_addr) == e, $sformatf("N=%0d mode %0d write %0d at %0d, expected %0d",
                                             n, md, k, wr_addr, e));
        k++;
      end
      guard++;
      @(negedge clk);
    end
    in_valid = 0; start = 0;
    // Read phase: one read per clock.
    for (k = 0; k < n; k++) begin
      int e = (md == MODE_INTERLEAVE) ? k : ref_jk(k, n, s);
      #1;
      check(rd_en && sel && !in_ready && !wr_en, $sformatf("read phase flags at %0d", k));
      check(int'(rd_addr) == e, $sformatf("N=%0d mode %0d read %0d at %0d, expected %0d",
                                           n, md, k, rd_addr, e));
      check(done == (k == n - 1), "done flag");
      @(negedge clk);
    end
    #1;
    check(!busy && !rd_en, "idle after the read phase");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Unlisted configurations are refused.
    for (int c = 0; c < 3; c++) begin
      @(negedge clk);
      start = 1;
      case (c)
        0: begin mod_typ = MOD_QPSK;  code_rate = RATE_2_3; depth_idx = 0; end
        1: begin mod_typ = MOD_16QAM; code_rate = RATE_1_2; depth_idx = 3; end
        default: begin mod_typ = mod_t'(3); code_rate = RATE_1_2; depth_idx = 0; end
      endcase
      #1;
      check(cfg_err, "cfg_err for an unlisted configuration");
      @(negedge clk);
      start = 0;
      #1;
      check(!busy, "refused configuration started a block");
    end
    for (int c = 0; c < NCFG; c++) begin
      run_block(cfg_at(c), MODE_INTERLEAVE);
      run_block(cfg_at(c), MODE_DEINTERLEAVE);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
