// tb_mvm_sa: self-checking test of the systolic MVM array (2 x 3 PEs here).
// Programs random complex weights for two frequencies k, runs one operation
// per frequency with random complex inputs for each array row, and compares
// every bottom output buffer with the sum over both array rows of the
// 16-term complex dot products, computed here in 64-bit integers. It checks
// the systolic skew (PE(r,c) starts r+c clocks after PE(0,0)) and the latency
// from start to done: 308 + SA_ROWS + SA_COLS clocks.
module tb_mvm_sa;
  import psb_pkg::*;
  localparam int R = 2, C = 3, W = 16, NE = 8;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset fires
  always #1 clk = ~clk;

  logic wr_en = 0;
  logic [0:0] wr_r = 0;
  logic [1:0] wr_c = 0;
  logic [6:0] wr_row = 0;
  logic [2:0] wr_elem = 0;
  cplx_t wr_data = '0;
  logic start = 0;
  logic [2:0] k = 0;
  cplx_t in_vec [R][W];
  logic busy, done;
  acc_cplx_t out [C][NE];

  mvm_sa #(.SA_ROWS(R), .SA_COLS(C)) dut (.*);

  int checks = 0, failures = 0;
  longint wre [8][R][C][W][NE], wim [8][R][C][W][NE];
  int t_go [R][C];
  int cyc = 0;
  always @(posedge clk) cyc++;

  for (genvar r = 0; r < R; r++)
    for (genvar c = 0; c < C; c++)
      always @(posedge clk) if (dut.go[r][c]) t_go[r][c] = cyc;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic program_k(input int kk);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        for (int w = 0; w < W; w++)
          for (int e = 0; e < NE; e++) begin
            @(negedge clk);
            wr_en = 1; wr_r = 1'(r); wr_c = 2'(c); wr_row = 7'(kk * W + w); wr_elem = 3'(e);
            wr_data.re = word_t'($urandom); wr_data.im = word_t'($urandom);
            wre[kk][r][c][w][e] = longint'(wr_data.re);
            wim[kk][r][c][w][e] = longint'(wr_data.im);
          end
    @(negedge clk) wr_en = 0;
  endtask

  task automatic run_k(input int kk);
    int lat;
    for (int r = 0; r < R; r++)
      for (int w = 0; w < W; w++) begin
        in_vec[r][w].re = word_t'($urandom);
        in_vec[r][w].im = word_t'($urandom);
      end
    @(negedge clk);
    start = 1; k = 3'(kk);
    @(negedge clk);
    start = 0; lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    check(lat == 309 + R + C, $sformatf("latency %0d", lat));
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        check(t_go[r][c] - t_go[0][0] == r + c, $sformatf("skew of PE %0d,%0d", r, c));
    for (int c = 0; c < C; c++)
      for (int e = 0; e < NE; e++) begin
        longint er = 0, ei = 0;
        for (int r = 0; r < R; r++)
          for (int w = 0; w < W; w++) begin
            longint a, b;
            a = longint'(in_vec[r][w].re); b = longint'(in_vec[r][w].im);
            er += a * wre[kk][r][c][w][e] - b * wim[kk][r][c][w][e];
            ei += a * wim[kk][r][c][w][e] + b * wre[kk][r][c][w][e];
          end
        check(longint'(out[c][e].re) == er && longint'(out[c][e].im) == ei,
              $sformatf("k %0d col %0d elem %0d: got %0d,%0d exp %0d,%0d", kk, c, e,
                        longint'(out[c][e].re), longint'(out[c][e].im), er, ei));
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    program_k(2);
    program_k(7);
    run_k(2);
    run_k(7);
    run_k(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
