// tb_adc: self-checking test of the ADC bank model at 6-bit resolution so
// that clipping occurs. For random held values and column groups, each code
// must equal the held value clipped to 63, one clock after conv, with valid
// and clip asserted exactly when expected.
module tb_adc;
  localparam int COLS = 128, LANES = 8, BITS = 6;
  logic clk = 0, rst_n = 1;
  always #1 clk = ~clk;
  initial #1 rst_n = 0;
  logic conv = 0;
  logic [3:0] sel = 0;
  logic [COLS-1:0][7:0] held;
  logic valid, clip;
  logic [LANES-1:0][BITS-1:0] code;
  int checks = 0, failures = 0, n_clip = 0;

  adc #(.ADC_BITS(BITS)) dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      logic [COLS-1:0][7:0] h;
      logic c;
      bit exp_clip;
      for (int k = 0; k < COLS; k++) h[k] = 8'($urandom_range(0, 100));
      held = h;
      c = ($urandom_range(0, 3) != 0);
      conv = c;
      sel = 4'($urandom);
      @(negedge clk);
      checks++;
      if (valid != c) begin failures++; $display("FAIL valid at %0d", t); end
      if (c) begin
        exp_clip = 0;
        for (int l = 0; l < LANES; l++) begin
          int v;
          v = int'(h[int'(sel) * LANES + l]);
          if (v > 63) begin v = 63; exp_clip = 1; end
          checks++;
          if (int'(code[l]) != v) begin
            failures++;
            if (failures < 10) $display("FAIL lane %0d got %0d exp %0d", l, code[l], v);
          end
        end
        checks++;
        if (clip != exp_clip) failures++;
        if (clip) n_clip++;
      end
    end
    checks++;
    if (n_clip == 0) failures++;
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
