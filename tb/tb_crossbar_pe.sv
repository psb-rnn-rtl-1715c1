// tb_crossbar_pe: self-checking test of one crossbar PE.
// Programs random signed complex weights into two wordline groups, applies
// random complex input vectors (and real-only vectors), and compares each of
// the 8 complex results with a dot product computed here in 64-bit integer
// arithmetic. It also checks the operation latency: 308 clocks for a complex
// input, 155 for a real-only input.
module tb_crossbar_pe;
  import psb_pkg::*;

  localparam int ACT_WL = 16;
  localparam int NE = 8;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset fires
  always #1 clk = ~clk;

  logic wr_en = 0;
  logic [6:0] wr_row = 0;
  logic [2:0] wr_elem = 0;
  cplx_t wr_data = '0;
  logic start = 0;
  logic [2:0] grp = 0;
  logic real_only = 0;
  cplx_t in_vec [ACT_WL];
  logic busy, done, adc_clip;
  acc_cplx_t out [NE];

  crossbar_pe dut (.*);

  int checks = 0, failures = 0;
  longint wre [8][ACT_WL][NE];
  longint wim [8][ACT_WL][NE];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic program_group(input int g);
    for (int r = 0; r < ACT_WL; r++)
      for (int e = 0; e < NE; e++) begin
        cplx_t w;
        w.re = word_t'($urandom);
        w.im = word_t'($urandom);
        wre[g][r][e] = longint'(w.re);
        wim[g][r][e] = longint'(w.im);
        @(negedge clk);
        wr_en = 1; wr_row = 7'(g * ACT_WL + r); wr_elem = 3'(e); wr_data = w;
      end
    @(negedge clk) wr_en = 0;
  endtask

  task automatic run_op(input int g, input bit ro, input int exp_lat);
    longint er, ei;
    int lat;
    for (int r = 0; r < ACT_WL; r++) begin
      in_vec[r].re = word_t'($urandom);
      in_vec[r].im = ro ? 16'sd0 : word_t'($urandom);
      // exercise the extremes now and then
      if ($urandom_range(0, 7) == 0) in_vec[r].re = 16'sh8000;
    end
    @(negedge clk);
    start = 1; grp = 3'(g); real_only = ro;
    @(negedge clk);
    start = 0;
    lat = 0;  // clocks after the edge that accepted start
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    check(lat == exp_lat, $sformatf("latency %0d expected %0d", lat, exp_lat));
    for (int e = 0; e < NE; e++) begin
      er = 0; ei = 0;
      for (int r = 0; r < ACT_WL; r++) begin
        longint a, b;
        a = longint'(in_vec[r].re);
        b = longint'(in_vec[r].im);
        er += a * wre[g][r][e] - b * wim[g][r][e];
        ei += a * wim[g][r][e] + b * wre[g][r][e];
      end
      check(longint'(out[e].re) == er && longint'(out[e].im) == ei,
            $sformatf("grp %0d elem %0d got %0d,%0dj expected %0d,%0dj", g, e,
                      longint'(out[e].re), longint'(out[e].im), er, ei));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    program_group(0);
    program_group(5);
    for (int t = 0; t < 4; t++) run_op(0, 0, 308);
    for (int t = 0; t < 3; t++) run_op(5, 0, 308);
    for (int t = 0; t < 3; t++) run_op(5, 1, 155);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
