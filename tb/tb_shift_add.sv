// tb_shift_add: self-checking test of the shift-and-add unit on its own.
// For random signed complex weights (16 rows x 8 elements) and random complex
// inputs, the test forms here the bitline sums a crossbar would produce for
// each 2-bit input slice (weights in the offset radix-4 cellv code) and feeds
// them, 8 columns per clock, with the slice, part and DAC-code-sum tags. The
// merged complex results must equal the exact complex dot products.
module tb_shift_add;
  import psb_pkg::*;
  localparam int COLS = 128, LANES = 8, W = 16, NE = 8;
  logic clk = 0, rst_n = 1;
  always #1 clk = ~clk;
  initial #1 rst_n = 0;
  logic clear = 0, en = 0, part = 0;
  logic [3:0] col_grp = 0, slice = 0;
  logic [5:0] dsum = 0;
  logic [LANES-1:0][7:0] code;
  acc_cplx_t out [NE];
  int checks = 0, failures = 0;

  shift_add dut (.*);

  word_t wre [W][NE], wim [W][NE], xre [W], xim [W];
  int cellv [W][COLS];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      // cellv image of the weights: alternating re/im digits, top digit offset
      for (int r = 0; r < W; r++) begin
        xre[r] = word_t'($urandom); xim[r] = word_t'($urandom);
        for (int e = 0; e < NE; e++) begin
          wre[r][e] = word_t'($urandom); wim[r][e] = word_t'($urandom);
          for (int d = 0; d < 8; d++) begin
            int dr, di;
            dr = (int'(wre[r][e]) >> (2 * d)) & 3;
            di = (int'(wim[r][e]) >> (2 * d)) & 3;
            if (d == 7) begin dr = dr ^ 2; di = di ^ 2; end
            cellv[r][16 * e + 2 * d] = dr;
            cellv[r][16 * e + 2 * d + 1] = di;
          end
        end
      end
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int p = 0; p < 2; p++)
        for (int s = 0; s < 9; s++) begin
          int dac [W];
          int ds;
          ds = 0;
          for (int r = 0; r < W; r++) begin
            int v;
            v = int'(p ? xim[r] : xre[r]);
            dac[r] = (s < 8) ? ((v >> (2 * s)) & 3) : ((v < 0) ? 1 : 0);
            ds += dac[r];
          end
          for (int g = 0; g < COLS / LANES; g++) begin
            for (int l = 0; l < LANES; l++) begin
              int sum;
              sum = 0;
              for (int r = 0; r < W; r++) sum += dac[r] * cellv[r][g * LANES + l];
              code[l] = 8'(sum);
            end
            en = 1; col_grp = 4'(g); slice = 4'(s); part = 1'(p); dsum = 6'(ds);
            @(negedge clk);
          end
        end
      en = 0;
      @(negedge clk);
      for (int e = 0; e < NE; e++) begin
        longint er, ei;
        er = 0; ei = 0;
        for (int r = 0; r < W; r++) begin
          er += longint'(xre[r]) * longint'(wre[r][e]) - longint'(xim[r]) * longint'(wim[r][e]);
          ei += longint'(xre[r]) * longint'(wim[r][e]) + longint'(xim[r]) * longint'(wre[r][e]);
        end
        checks++;
        if (longint'(out[e].re) != er || longint'(out[e].im) != ei) begin
          failures++;
          $display("FAIL elem %0d got %0d,%0d exp %0d,%0d", e, longint'(out[e].re), longint'(out[e].im), er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
