// tb_interleaver_memory: random writes and reads of the 576-bit memory
// checked against an array model, including the one-cycle read latency, the
// hold of the read data without rd_en, and read-before-write on one address.
module tb_interleaver_memory;
  localparam int DEPTH = 576;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_data = 0, rd_en = 0, rd_data;
  logic [9:0] wr_addr = '0, rd_addr = '0;
  bit   model [DEPTH];
  bit   expect_q;
  int checks = 0, failures = 0;

  interleaver_memory #(.DEPTH(DEPTH)) dut (.*);

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
    // Fill every address first so that every later read is defined.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(a); wr_data = 1'($urandom); model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    expect_q = rd_data;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      wr_en   = ($urandom % 2) == 0;
      wr_addr = 10'($urandom % DEPTH);
      wr_data = 1'($urandom);
      rd_en   = ($urandom % 4) != 0;
      rd_addr = (($urandom % 8) == 0) ? wr_addr : 10'($urandom % DEPTH);
      if (rd_en) expect_q = model[rd_addr];
      if (wr_en) model[wr_addr] = wr_data;
      @(posedge clk);
      #1;
      checks++;
      if (rd_data != expect_q) begin
        failures++;
        $display("read mismatch at cycle %0d addr %0d: %0b expected %0b", c, rd_addr, rd_data, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
