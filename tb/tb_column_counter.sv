// tb_column_counter: checks the column counter against a software count under
// random enable and clear, including the wrap flag from 15 to 0.
module tb_column_counter;
  localparam int D = 16;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [3:0] i;
  logic wrap;
  int checks = 0, failures = 0, model = 0, wraps = 0;

  column_counter #(.D(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      en    = ($urandom % 4) != 0;
      clear = ($urandom % 97) == 0;
      #1;
      checks++;
      if (i != model[3:0] || wrap != (en && !clear && model == D - 1)) begin
        failures++;
        $display("mismatch: i=%0d model=%0d wrap=%0b", i, model, wrap);
      end
      if (wrap) wraps++;
      if (clear) model = 0;
      else if (en) model = (model == D - 1) ? 0 : model + 1;
    end
    checks++;
    if (wraps < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
