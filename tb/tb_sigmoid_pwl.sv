// tb_sigmoid_pwl: self-checking test of the piecewise-linear sigmoid.
// Sweeps every 7th input code over the whole Q5.10 range plus the segment
// edges. Each output must equal the PLAN formula evaluated here in real
// arithmetic (within 1 LSB) and lie within 0.02 of the exact sigmoid; every
// segment must be hit.
module tb_sigmoid_pwl;
  import psb_pkg::*;
  word_t x, y;
  logic [1:0] seg;
  int checks = 0, failures = 0;
  int seg_hits [4];

  sigmoid_pwl dut (.*);

  function automatic real plan(input real v);
    real a, r;
    a = (v < 0) ? -v : v;
    if (a >= 5.0) r = 1.0;
    else if (a >= 2.375) r = a / 32.0 + 0.84375;
    else if (a >= 1.0) r = a / 8.0 + 0.625;
    else r = a / 4.0 + 0.5;
    return (v < 0) ? 1.0 - r : r;
  endfunction

  task automatic try(input int code);
    real v, exp_v, got, diff, sg;
    x = word_t'(code);
    #1;
    v = real'(code) / 1024.0;
    exp_v = plan(v);
    got = real'(y) / 1024.0;
    sg = 1.0 / (1.0 + $exp(-v));
    diff = got - exp_v;
    checks++;
    if (diff > 1.5 / 1024.0 || diff < -1.5 / 1024.0 || got - sg > 0.02 || sg - got > 0.02) begin
      failures++;
      $display("FAIL x=%0d y=%0d plan=%f sigmoid=%f", code, y, exp_v, sg);
    end
    seg_hits[seg]++;
  endtask

  initial begin
    for (int c = -32768; c < 32768; c += 7) try(c);
    try(1024); try(-1024); try(2432); try(-2432); try(5120); try(-5120); try(32767); try(-32768);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seg_hits[s] == 0) begin failures++; $display("FAIL segment %0d never used", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
