// tb_tanh_rlut: self-checking test of the range-lookup tanh.
// Sweeps every 3rd input code over the whole Q5.10 range. Each output must be
// a multiple of 1/32, within 1/64 + 2 LSB of the exact tanh, odd-symmetric,
// and monotonic; saturation must be flagged exactly when the output is +-1.
module tb_tanh_rlut;
  import psb_pkg::*;
  word_t x, y;
  logic sat;
  int checks = 0, failures = 0;
  int prev;

  tanh_rlut dut (.*);

  task automatic fail(input string s);
    failures++;
    $display("FAIL %s", s);
  endtask

  initial begin
    prev = -2000;
    for (int c = -32767; c < 32768; c += 3) begin
      real v, t, got;
      int yn;
      x = word_t'(c);
      #1;
      v = real'(c) / 1024.0;
      t = (($exp(2.0 * v) - 1.0) / ($exp(2.0 * v) + 1.0));
      got = real'(y) / 1024.0;
      checks++;
      if (got - t > 1.0 / 64 + 2.0 / 1024 || t - got > 1.0 / 64 + 2.0 / 1024)
        fail($sformatf("x=%0d y=%0d tanh=%f", c, y, t));
      checks++;
      if (int'(y) % 32 != 0) fail($sformatf("x=%0d y=%0d not a table level", c, y));
      checks++;
      if (int'(y) < prev) fail($sformatf("x=%0d not monotonic", c));
      prev = int'(y);
      checks++;
      if (sat != (y == 16'sd1024 || y == -16'sd1024)) fail($sformatf("x=%0d sat flag", c));
      yn = int'(y);
      x = word_t'(-c);
      #1;
      checks++;
      if (int'(y) != -yn) fail($sformatf("x=%0d not odd", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
