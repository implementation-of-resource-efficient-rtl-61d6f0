// tb_qam16_block: checks every address of the qam16_block against the two-step
// interleaver formula, for every permitted depth of that modulation, and the
// sample addresses of the first rows listed for the standard.
module tb_qam16_block;
  import tb_wimax_ref_pkg::*;
  logic [5:0] r, j;
  logic [3:0] i;
  logic [9:0] kn;
  int checks = 0, failures = 0;

  qam16_block dut (.r, .i, .j, .kn);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int n, int jj, int ii, int expected);
    r = 6'(n / 16); j = 6'(jj); i = 4'(ii);
    #1;
    checks++;
    if (int'(kn) != expected) begin
      failures++;
      $display("N=%0d j=%0d i=%0d: kn=%0d expected %0d", n, jj, ii, kn, expected);
    end
  endtask

  initial begin
    for (int c = 0; c < NCFG; c++) begin
      automatic cfg_t cf = cfg_at(c);
      if (cf.mod_typ != 1) continue;
      for (int jj = 0; jj < cf.ncbps / 16; jj++)
        for (int ii = 0; ii < 16; ii++)
          check_one(cf.ncbps, jj, ii, ref_jk(16 * jj + ii, cf.ncbps, ref_s(1)));
    end
    // Sample addresses: first four rows, first six columns.
    begin
      int n;
      int t [4][6];
      case (1)
        0: begin n = 96;  t = '{'{0,6,12,18,24,30}, '{1,7,13,19,25,31}, '{2,8,14,20,26,32}, '{3,9,15,21,27,33}}; end
        1: begin n = 192; t = '{'{0,13,24,37,48,61}, '{1,12,25,36,49,60}, '{2,15,26,39,50,63}, '{3,14,27,38,51,62}}; end
        default: begin n = 288; t = '{'{0,20,37,54,74,91}, '{1,18,38,55,72,92}, '{2,19,36,56,73,90}, '{3,23,40,57,77,94}}; end
      endcase
      for (int jj = 0; jj < 4; jj++)
        for (int ii = 0; ii < 6; ii++)
          check_one(n, jj, ii, t[jj][ii]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
