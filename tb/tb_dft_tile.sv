// tb_dft_tile: self-checking test of the FFT and IFFT PE tiles.
// A forward tile and an inverse tile of size 8, and a forward tile of size 16
// (two PEs), transform random blocks. Expected outputs are computed here from
// twiddles obtained with $cos/$sin and rounded to Q1.14, using the same
// floor-and-saturate scaling; they must match exactly. A round trip
// IFFT(FFT(x)) must return x within 2 LSB. The latency of a real-only forward
// transform (156 clocks) and of a complex inverse transform (309) is checked.
module tb_dft_tile;
  import psb_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset fires
  always #1 clk = ~clk;

  int checks = 0, failures = 0;

  logic  rdy8, rdyi, rdy16;
  logic  st8 = 0, sti = 0, st16 = 0;
  logic  ro8 = 0, roi = 0, ro16 = 0;
  cplx_t in8 [8], ini [8], in16 [16];
  cplx_t o8 [8], oi [8], o16 [16];
  logic  b8, bi, b16, d8, di, d16;

  dft_tile #(.N(8), .INVERSE(1'b0)) u_f8 (
    .clk, .rst_n, .ready(rdy8), .start(st8), .real_only(ro8), .in_vec(in8),
    .busy(b8), .done(d8), .out(o8));
  dft_tile #(.N(8), .INVERSE(1'b1)) u_i8 (
    .clk, .rst_n, .ready(rdyi), .start(sti), .real_only(roi), .in_vec(ini),
    .busy(bi), .done(di), .out(oi));
  dft_tile #(.N(16), .INVERSE(1'b0)) u_f16 (
    .clk, .rst_n, .ready(rdy16), .start(st16), .real_only(ro16), .in_vec(in16),
    .busy(b16), .done(d16), .out(o16));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic longint q14(input real v);
    return longint'($floor(v * 16384.0 + 0.5));
  endfunction

  function automatic longint sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // floor division by 2^s of a signed value
  function automatic longint fl(input longint v, input int s);
    return v >>> s;
  endfunction

  // reference DFT of n points; inv selects +j and the 1/n scaling
  task automatic ref_dft(input int n, input bit inv, input longint xr[16],
                         input longint xi[16], output longint yr[16], output longint yi[16]);
    real pi = 3.14159265358979;
    for (int k = 0; k < n; k++) begin
      longint sr = 0, si = 0;
      for (int r = 0; r < n; r++) begin
        longint c, s;
        c = q14($cos(2.0 * pi * r * k / n));
        s = q14($sin(2.0 * pi * r * k / n));
        if (!inv) s = -s;
        sr += xr[r] * c - xi[r] * s;
        si += xr[r] * s + xi[r] * c;
      end
      yr[k] = sat(fl(sr, 14 + (inv ? $clog2(n) : 0)));
      yi[k] = sat(fl(si, 14 + (inv ? $clog2(n) : 0)));
    end
  endtask

  initial begin
    longint xr[16], xi[16], yr[16], yi[16];
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (rdy8 && rdyi && rdy16);
    @(negedge clk);
    for (int t = 0; t < 6; t++) begin
      bit ro;
      ro = (t % 2 == 0);
      // forward, size 8
      for (int r = 0; r < 16; r++) begin
        xr[r] = longint'($signed(16'($urandom_range(0, 4095)))) - 2048;
        xi[r] = ro ? 0 : longint'($signed(16'($urandom_range(0, 4095)))) - 2048;
      end
      for (int r = 0; r < 8; r++) begin in8[r].re = 16'(xr[r]); in8[r].im = 16'(xi[r]); end
      for (int r = 0; r < 16; r++) begin in16[r].re = 16'(xr[r]); in16[r].im = 16'(xi[r]); end
      ro8 = ro; ro16 = ro; st8 = 1; st16 = 1;
      @(negedge clk); st8 = 0; st16 = 0; lat = 0;
      while (!d8) begin @(negedge clk); lat++; end
      if (t < 2) check(lat == (ro ? 156 : 309), $sformatf("fft latency %0d", lat));
      ref_dft(8, 0, xr, xi, yr, yi);
      for (int k = 0; k < 8; k++)
        check(longint'(o8[k].re) == yr[k] && longint'(o8[k].im) == yi[k],
              $sformatf("fft8 k=%0d got %0d,%0d exp %0d,%0d", k, o8[k].re, o8[k].im, yr[k], yi[k]));
      if (!d16) wait (d16);
      @(negedge clk);
      ref_dft(16, 0, xr, xi, yr, yi);
      for (int k = 0; k < 16; k++)
        check(longint'(o16[k].re) == yr[k] && longint'(o16[k].im) == yi[k],
              $sformatf("fft16 k=%0d got %0d,%0d exp %0d,%0d", k, o16[k].re, o16[k].im, yr[k], yi[k]));
      // inverse of the size-8 result: reference and round trip
      for (int k = 0; k < 8; k++) begin
        ini[k] = o8[k];
        yr[k] = longint'(o8[k].re); yi[k] = longint'(o8[k].im);
      end
      sti = 1; roi = 0;
      @(negedge clk); sti = 0; lat = 0;
      while (!di) begin @(negedge clk); lat++; end
      if (t < 2) check(lat == 309, $sformatf("ifft latency %0d", lat));
      begin
        longint zr[16], zi[16];
        ref_dft(8, 1, yr, yi, zr, zi);
        for (int m = 0; m < 8; m++) begin
          check(longint'(oi[m].re) == zr[m] && longint'(oi[m].im) == zi[m],
                $sformatf("ifft8 m=%0d got %0d,%0d exp %0d,%0d", m, oi[m].re, oi[m].im, zr[m], zi[m]));
          check(longint'(oi[m].re) - xr[m] <= 2 && xr[m] - longint'(oi[m].re) <= 2,
                $sformatf("round trip m=%0d got %0d exp %0d", m, oi[m].re, xr[m]));
        end
      end
    end
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
