// tb_sample_hold: self-checking test of the sample & hold bank. Random bitline
// values change every clock; the held outputs must equal the bitlines at the
// last clock with sample high and must not follow the bitlines otherwise.
module tb_sample_hold;
  localparam int COLS = 128;
  logic clk = 0;
  always #1 clk = ~clk;
  logic sample = 0;
  logic [COLS-1:0][7:0] bitline, hold_out, expect_v;
  int checks = 0, failures = 0;

  sample_hold dut (.*);

  initial begin
    for (int c = 0; c < COLS; c++) bitline[c] = 8'($urandom);
    sample = 1;
    for (int t = 0; t < 400; t++) begin
      @(posedge clk);
      if (sample) expect_v = bitline;
      @(negedge clk);
      if (t > 0) begin
        checks++;
        if (hold_out != expect_v) begin
          failures++;
          if (failures < 10) $display("FAIL at step %0d", t);
        end
      end
      for (int c = 0; c < COLS; c++) bitline[c] = 8'($urandom);
      sample = ($urandom_range(0, 3) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
