// tb_depth_rom: checks the depth table for every modulation, code-rate and
// index code against the list of permitted IEEE 802.16e interleaver depths.
module tb_depth_rom;
  import wimax_il_pkg::*;
  import tb_wimax_ref_pkg::*;
  mod_t       mod_typ;
  rate_t      code_rate;
  logic [2:0] depth_idx;
  row_t       rows;
  addr_t      ncbps;
  logic       valid;
  int checks = 0, failures = 0, n_valid = 0;

  depth_rom dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int c = 0; c < 8; c++)
        for (int x = 0; x < 8; x++) begin
          int n;
          mod_typ = mod_t'(m); code_rate = rate_t'(c); depth_idx = 3'(x);
          #1;
          n = ref_depth(m, c, x);
          checks++;
          if (valid != (n != 0) || (n != 0 && (int'(ncbps) != n || int'(rows) != n / 16))) begin
            failures++;
            $display("mod=%0d rate=%0d idx=%0d: valid=%0b ncbps=%0d rows=%0d, expected %0d",
                     m, c, x, valid, ncbps, rows, n);
          end
          if (valid) n_valid++;
        end
    checks++;
    if (n_valid != NCFG) begin
      failures++;
      $display("%0d permitted configurations, expected %0d", n_valid, NCFG);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
