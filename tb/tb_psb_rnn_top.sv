// tb_psb_rnn_top: end-to-end test of the whole PSB-RNN engine at its default
// size (block size 8, 128 inputs, 128 hidden units: 2 x 8 MVM PEs, one FFT
// PE and one IFFT PE).
//
// Random block-circulant gate weights (first column of each 8 x 8 block) are
// transformed to the frequency domain here with $cos/$sin, quantised to Q3.12
// and programmed into the systolic array; biases and peephole weights are
// random, with strong biases on a few hidden elements so that every sigmoid
// segment and the tanh saturation are reached. Four time steps are run. After
// each step the gate pre-activations (dense circulant matrix times [x; h]
// computed here directly, without any FFT) and the new c and h (LSTM
// equations in real arithmetic, from the engine's previous state) are
// compared within fixed-point tolerances. The cycle count of each step is
// checked against the sum of the block latencies, and every mechanism
// (real-only FFT, SRAM staging, systolic skew, vertical accumulation, IFFT,
// lane pipeline, sigmoid segments, tanh saturation, recurrence) is counted.
module tb_psb_rnn_top;
  import psb_pkg::*;

  localparam int N = 8, IN_DIM = 128, HID = 128, LANES = 4;
  localparam int Q = (IN_DIM + HID) / N, P = 4 * HID / N;
  localparam int STEPS = 4;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 1;
  always #1 clk = ~clk;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous reset fires

  logic ready, busy, done;
  logic w_wr_en = 0; logic [0:0] w_wr_r = 0; logic [2:0] w_wr_c = 0;
  logic [6:0] w_wr_row = 0; logic [2:0] w_wr_elem = 0; cplx_t w_wr_data = '0;
  logic p_wr_en = 0, p_wr_kind = 0; logic [1:0] p_wr_gate = 0;
  logic [6:0] p_wr_addr = 0; word_t p_wr_data = '0;
  logic x_wr_en = 0; logic [6:0] x_wr_addr = 0; word_t x_wr_data = '0;
  logic clear_state = 0, start = 0;
  word_t h_out [HID], c_out [HID];

  psb_rnn_top dut (.*);

  int checks = 0, failures = 0;
  real wcol [P][Q][N];      // first columns of the circulant blocks
  real bias [4][HID], peep [3][HID];
  real x [IN_DIM];
  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---- mechanism counters
  int n_fft_real = 0, n_sram_wr = 0, n_sa_ops = 0, n_skew = 0, n_vacc = 0;
  int n_ifft = 0, n_lane = 0, n_tsat = 0, n_recur = 0;
  int seg_hits [4];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_fft.go && dut.u_fft.real_only) n_fft_real++;
    if (dut.g_sram[1].u_sram.we || dut.g_sram[0].u_sram.we) n_sram_wr++;
    if (dut.u_sa.accept) n_sa_ops++;
    if (dut.u_sa.go[1][7] && !dut.u_sa.go[0][0]) n_skew++;
    if (dut.u_sa.g_row[1].g_col[0].u_pe.done) n_vacc++;
    if (dut.u_ifft.go) n_ifft++;
    for (int l = 0; l < LANES; l++)
      if (dut.ln_ovalid[l]) begin
        n_lane++;
        if (dut.ln_tsat[l]) n_tsat++;
      end
    if (dut.ln_valid)
      for (int l = 0; l < LANES; l++)
        for (int g = 0; g < 4; g++) seg_hits[dut.ln_seg[l][g]]++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  function automatic real rnd(input real range);
    return (real'($urandom_range(0, 100000)) / 100000.0 * 2.0 - 1.0) * range;
  endfunction

  function automatic word_t q10(input real v);
    return word_t'($rtoi($floor(v * 1024.0 + 0.5)));
  endfunction

  function automatic real plan(input real v);
    real a, r;
    a = (v < 0) ? -v : v;
    if (a >= 5.0) r = 1.0;
    else if (a >= 2.375) r = a / 32.0 + 0.84375;
    else if (a >= 1.0) r = a / 8.0 + 0.625;
    else r = a / 4.0 + 0.5;
    return (v < 0) ? 1.0 - r : r;
  endfunction

  function automatic real rtanh(input real v);
    return ($exp(2.0 * v) - 1.0) / ($exp(2.0 * v) + 1.0);
  endfunction

  initial begin
    real u [IN_DIM + HID];
    real hprev [HID], cprev [HID];
    int t0, lat, exp_lat;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- weights: random circulant blocks, programmed as Q3.12 spectra
    for (int i = 0; i < P; i++)
      for (int j = 0; j < Q; j++) begin
        for (int r = 0; r < N; r++) wcol[i][j][r] = rnd(0.06);
        for (int k = 0; k < N; k++) begin
          real sr, si;
          sr = 0.0;
          si = 0.0;
          for (int r = 0; r < N; r++) begin
            sr += wcol[i][j][r] * $cos(2.0 * PI * r * k / N);
            si -= wcol[i][j][r] * $sin(2.0 * PI * r * k / N);
          end
          @(negedge clk);
          w_wr_en = 1; w_wr_r = 1'(j / 16); w_wr_c = 3'(i / 8);
          w_wr_row = 7'(k * 16 + j % 16); w_wr_elem = 3'(i % 8);
          w_wr_data.re = word_t'($rtoi($floor(sr * 4096.0 + 0.5)));
          w_wr_data.im = word_t'($rtoi($floor(si * 4096.0 + 0.5)));
        end
      end
    @(negedge clk) w_wr_en = 0;

    // ---- biases and peepholes; elements 0..7 get strong f/i/g biases
    for (int e = 0; e < HID; e++) begin
      for (int g = 0; g < 4; g++) begin
        bias[g][e] = rnd(0.5);
        if (e < 8 && g != 2) bias[g][e] = 6.0;
        if (e >= 8 && e < 16) bias[g][e] = (g == 0) ? 3.0 : -3.0;
        bias[g][e] = real'(q10(bias[g][e])) / 1024.0;
        @(negedge clk);
        p_wr_en = 1; p_wr_kind = 0; p_wr_gate = 2'(g); p_wr_addr = 7'(e); p_wr_data = q10(bias[g][e]);
      end
      for (int g = 0; g < 3; g++) begin
        peep[g][e] = real'(q10(rnd(0.3))) / 1024.0;
        @(negedge clk);
        p_wr_en = 1; p_wr_kind = 1; p_wr_gate = 2'(g); p_wr_addr = 7'(e); p_wr_data = q10(peep[g][e]);
      end
    end
    @(negedge clk) p_wr_en = 0;
    wait (ready);
    @(negedge clk);
    clear_state = 1;
    @(negedge clk) clear_state = 0;

    for (int s = 0; s < STEPS; s++) begin
      for (int e = 0; e < HID; e++) begin
        hprev[e] = real'(h_out[e]) / 1024.0;
        cprev[e] = real'(c_out[e]) / 1024.0;
        if (s > 0 && h_out[e] != 0) n_recur++;
      end
      for (int a = 0; a < IN_DIM; a++) begin
        x[a] = real'(q10(rnd(1.0))) / 1024.0;
        @(negedge clk);
        x_wr_en = 1; x_wr_addr = 7'(a); x_wr_data = q10(x[a]);
      end
      @(negedge clk) x_wr_en = 0;
      for (int a = 0; a < IN_DIM; a++) u[a] = x[a];
      for (int a = 0; a < HID; a++) u[IN_DIM + a] = hprev[a];

      start = 1;
      t0 = cyc;
      @(negedge clk) start = 0;
      while (!done) @(negedge clk);
      lat = cyc - t0;
      // Each tile operation costs its start clock, the tile latency (FFT tile
      // real-only 156, array 309 + 2 + 8, IFFT tile 309) and one clock to see
      // done. FFT: + N SRAM writes per block; MVM: + 17 SRAM reads per
      // frequency; lanes: HID/LANES issue clocks + 2 drain; + start and done.
      exp_lat = 1 + Q * (1 + 156 + 1 + N) + N * (17 + 1 + 319 + 1) + P * (1 + 309 + 1)
              + HID / LANES + 2 + 1;
      check(lat == exp_lat, $sformatf("step %0d took %0d clocks, expected %0d", s, lat, exp_lat));

      // ---- reference: dense circulant MVM and LSTM equations
      for (int i = 0; i < P; i++)
        for (int a = 0; a < N; a++) begin
          real z, got;
          z = 0.0;
          for (int j = 0; j < Q; j++)
            for (int b = 0; b < N; b++)
              z += wcol[i][j][(a - b + N) % N] * u[j * N + b];
          got = real'(dut.pre_mem[i * N + a]) / 1024.0;
          check(got - z < 0.03 && z - got < 0.03,
                $sformatf("step %0d pre-activation %0d: got %f expected %f", s, i * N + a, got, z));
        end
      for (int e = 0; e < HID; e++) begin
        real pf, pi_, po, pg, f, ig, o, g, c, h, dc, dh;
        int b, m;
        b = e / N; m = e % N;
        pf  = real'(dut.pre_mem[(b * 4 + 0) * N + m]) / 1024.0;
        pi_ = real'(dut.pre_mem[(b * 4 + 1) * N + m]) / 1024.0;
        po  = real'(dut.pre_mem[(b * 4 + 2) * N + m]) / 1024.0;
        pg  = real'(dut.pre_mem[(b * 4 + 3) * N + m]) / 1024.0;
        f  = plan(pf + peep[0][e] * cprev[e] + bias[0][e]);
        ig = plan(pi_ + peep[1][e] * cprev[e] + bias[1][e]);
        o  = plan(po + peep[2][e] * cprev[e] + bias[2][e]);
        g  = plan(pg + bias[3][e]);
        c  = f * cprev[e] + ig * g;
        h  = o * rtanh(c);
        dc = real'(c_out[e]) / 1024.0 - c;
        dh = real'(h_out[e]) / 1024.0 - h;
        check(dc < 0.01 && dc > -0.01, $sformatf("step %0d c[%0d] got %f expected %f", s, e, real'(c_out[e]) / 1024.0, c));
        check(dh < 0.03 && dh > -0.03, $sformatf("step %0d h[%0d] got %f expected %f", s, e, real'(h_out[e]) / 1024.0, h));
      end
      $display("step %0d done in %0d clocks", s, lat);
    end

    // ---- every mechanism must have happened
    check(n_fft_real == STEPS * Q, $sformatf("real-only FFTs %0d", n_fft_real));
    check(n_sram_wr == STEPS * Q * N, $sformatf("SRAM writes %0d", n_sram_wr));
    check(n_sa_ops == STEPS * N, $sformatf("systolic array operations %0d", n_sa_ops));
    check(n_skew == STEPS * N, $sformatf("systolic skew events %0d", n_skew));
    check(n_vacc == STEPS * N, $sformatf("vertical accumulations %0d", n_vacc));
    check(n_ifft == STEPS * P, $sformatf("IFFTs %0d", n_ifft));
    check(n_lane == STEPS * HID, $sformatf("lane outputs %0d", n_lane));
    check(n_tsat > 0, "tanh saturation never reached");
    check(n_recur > 0, "recurrent state never non-zero");
    for (int sg = 0; sg < 4; sg++) check(seg_hits[sg] > 0, $sformatf("sigmoid segment %0d never used", sg));
    $display("mechanisms: fft_real=%0d sram_wr=%0d sa_ops=%0d skew=%0d vacc=%0d ifft=%0d lane=%0d tanh_sat=%0d recur=%0d seg=%0d/%0d/%0d/%0d",
             n_fft_real, n_sram_wr, n_sa_ops, n_skew, n_vacc, n_ifft, n_lane, n_tsat, n_recur,
             seg_hits[0], seg_hits[1], seg_hits[2], seg_hits[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
