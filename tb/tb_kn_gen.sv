// tb_kn_gen: runs the address generator core through every permitted depth
// and modulation, with and without stalls of the step input, and checks every
// address against the two-step interleaver formula, the linear address, the
// last flag, that each block is a permutation, and that one address is made
// per clock. Also checks the start of the 192-bit 16-QAM sequence
// 0 13 24 37 ... 181 1 12 25 36 49 60.
module tb_kn_gen;
  import wimax_il_pkg::*;
  import tb_wimax_ref_pkg::*;
  logic  clk = 0, rst_n = 0, start = 0, step = 0;
  mod_t  mod_typ = MOD_QPSK;
  row_t  rows = '0;
  logic  busy, last;
  col_t  i;
  row_t  j;
  addr_t kn, lin;
  int checks = 0, failures = 0;

  kn_gen dut (.*);

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

  // Runs one block; stall_pct is the chance in percent of a cycle without step.
  task automatic run_block(int m, int n, int stall_pct, output int cycles, ref int seq[$]);
    bit seen [NCBPS_MAX];
    int k = 0;
    seq = {};
    @(negedge clk);
    start = 1; mod_typ = mod_t'(m); rows = row_t'(n / 16); step = 0;
    @(negedge clk);
    start = 0;
    cycles = 0;
    while (k < n) begin
      step = ($urandom % 100) >= stall_pct;
      #1;
      check(busy, $sformatf("busy low at bit %0d of %0d", k, n));
      if (step) begin
        int e = ref_jk(k, n, ref_s(m));
        check(int'(kn) == e, $sformatf("mod %0d N=%0d k=%0d: kn=%0d expected %0d", m, n, k, kn, e));
        check(int'(lin) == k, $sformatf("lin=%0d expected %0d", lin, k));
        check(last == (k == n - 1), $sformatf("last=%0b at k=%0d", last, k));
        check(!seen[kn], $sformatf("address %0d repeated", kn));
        seen[kn] = 1;
        seq.push_back(int'(kn));
        k++;
      end
      cycles++;
      @(negedge clk);
    end
    step = 0;
    #1;
    check(!busy, "busy still high after the last address");
  endtask

  initial begin
    int cycles;
    int seq[$];
    int fig [22] = '{0,13,24,37,48,61,72,85,96,109,120,133,144,157,168,181,1,12,25,36,49,60};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCFG; c++) begin
      automatic cfg_t cf = cfg_at(c);
      run_block(cf.mod_typ, cf.ncbps, 0, cycles, seq);
      check(cycles == cf.ncbps, $sformatf("N=%0d took %0d cycles", cf.ncbps, cycles));
      run_block(cf.mod_typ, cf.ncbps, 30, cycles, seq);
    end
    run_block(1, 192, 0, cycles, seq);
    for (int n = 0; n < 22; n++)
      check(seq[n] == fig[n], $sformatf("16-QAM 192 address %0d is %0d, expected %0d", n, seq[n], fig[n]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
