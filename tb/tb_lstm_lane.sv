// tb_lstm_lane: self-checking test of one activation/scalar lane.
// Random gate results, biases, peephole weights and previous cell states are
// streamed in back to back; the new cell state and hidden state must match a
// real-arithmetic model of the LSTM equations (with the piecewise-linear
// sigmoid and the exact tanh) within 0.01 for c and 0.03 for h, and arrive
// exactly 2 clocks after their inputs.
module tb_lstm_lane;
  import psb_pkg::*;
  localparam int NT = 400;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset fires
  always #1 clk = ~clk;

  logic in_valid = 0, out_valid, tanh_sat;
  word_t pre [4], bias [4], peep [3], c_prev, c_out, h_out;
  logic [1:0] sig_seg [4];

  lstm_lane dut (.*);

  int checks = 0, failures = 0;
  real exp_c [NT], exp_h [NT];
  int n_in = 0, n_out = 0;
  int in_cyc [NT];
  int cyc = 0;

  function automatic real plan(input real v);
    real a, r;
    a = (v < 0) ? -v : v;
    if (a >= 5.0) r = 1.0;
    else if (a >= 2.375) r = a / 32.0 + 0.84375;
    else if (a >= 1.0) r = a / 8.0 + 0.625;
    else r = a / 4.0 + 0.5;
    return (v < 0) ? 1.0 - r : r;
  endfunction

  function automatic real q(input word_t w);
    return real'(w) / 1024.0;
  endfunction

  function automatic word_t rnd(input int range_q10);
    return word_t'($urandom_range(0, 2 * range_q10) - range_q10);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      real dc, dh;
      dc = q(c_out) - exp_c[n_out];
      dh = q(h_out) - exp_h[n_out];
      checks += 2;
      if (dc > 0.01 || dc < -0.01 || dh > 0.03 || dh < -0.03) begin
        failures++;
        $display("FAIL #%0d c=%f exp %f h=%f exp %f", n_out, q(c_out), exp_c[n_out], q(h_out), exp_h[n_out]);
      end
      if (cyc - in_cyc[n_out] != 2) begin
        failures++;
        $display("FAIL #%0d latency %0d", n_out, cyc - in_cyc[n_out]);
      end
      n_out++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      real f, i, o, g, c;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < 4; k++) begin pre[k] = rnd(6000); bias[k] = rnd(1024); end
      for (int k = 0; k < 3; k++) peep[k] = rnd(512);
      c_prev = rnd(2500);
      if (in_valid) begin
        f = plan(q(pre[0]) + q(bias[0]) + q(peep[0]) * q(c_prev));
        i = plan(q(pre[1]) + q(bias[1]) + q(peep[1]) * q(c_prev));
        o = plan(q(pre[2]) + q(bias[2]) + q(peep[2]) * q(c_prev));
        g = plan(q(pre[3]) + q(bias[3]));
        c = f * q(c_prev) + i * g;
        exp_c[n_in] = c;
        exp_h[n_in] = o * (($exp(2.0 * c) - 1.0) / ($exp(2.0 * c) + 1.0));
        in_cyc[n_in] = cyc;
        n_in++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_out != n_in) begin failures++; $display("FAIL %0d outputs for %0d inputs", n_out, n_in); end
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
