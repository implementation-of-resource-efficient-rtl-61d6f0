// tb_row_counter: checks the row counter for every row count 1..36 under
// random enable and occasional clear, against a software count.
module tb_row_counter;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [5:0] rows, j;
  logic wrap;
  int checks = 0, failures = 0, model = 0, wraps = 0;

  row_counter #(.ROWS_MAX(36)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rows = 6'd1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 1; r <= 36; r++) begin
      @(negedge clk);
      rows = 6'(r); clear = 1; en = 0; model = 0;
      @(negedge clk);
      clear = 0;
      for (int c = 0; c < 3 * r + 5; c++) begin
        en    = ($urandom % 3) != 0;
        clear = ($urandom % 211) == 0;
        #1;
        checks++;
        if (j != 6'(model) || wrap != (en && !clear && model == r - 1)) begin
          failures++;
          $display("mismatch rows=%0d: j=%0d model=%0d wrap=%0b", r, j, model, wrap);
        end
        if (wrap) wraps++;
        if (clear) model = 0;
        else if (en) model = (model == r - 1) ? 0 : model + 1;
        @(negedge clk);
      end
    end
    checks++;
    if (wraps < 36) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
