// dft_tile: the FFT PE tile (INVERSE = 0) or the IFFT PE tile (INVERSE = 1).
//
// The architecture performs the FFT as one matrix-vector product: the sparse
// butterfly stages and the input reordering of the FFT fuse into the dense
// N x N DFT matrix, which is stored in crossbar cells, and the input block is
// applied to N wordlines. Output k of the block lives in element k of the
// wordlines, so a tile has ceil(N/8) crossbar PEs (one PE for N = 8).
//
// After reset the tile programs its own crossbars with the twiddle factors
// exp(-/+ j*2*pi*r*k/N) in Q1.14 (N*N element writes per PE, in parallel over
// the PEs) and then raises ready. A start while ready runs one transform on
// in_vec; done pulses with out holding the transform. The forward transform
// returns sum_r x[r] w^(rk); the inverse also divides by N, so out of the
// inverse tile is the IDFT. Both are rounded toward minus infinity and
// saturated to 16 bits. real_only skips the imaginary input slices (the FFT
// of a real input block). Latency is the PE latency plus one clock.
module dft_tile
  import psb_pkg::*;
#(
  parameter int N         = 8,
  parameter bit INVERSE   = 1'b0,
  parameter int ROWS      = 128,
  parameter int COLS      = 128,
  parameter int CELL_BITS = 2,
  parameter int ACT_WL    = 16,
  parameter int ADC_BITS  = 8,
  parameter int LANES     = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  output logic  ready,
  input  logic  start,
  input  logic  real_only,
  input  cplx_t in_vec [N],
  output logic  busy,
  output logic  done,
  output cplx_t out [N]
);

  localparam int NE    = COLS / (2 * DW / CELL_BITS);
  localparam int NPE   = (N + NE - 1) / NE;
  localparam int SHIFT = TW_FRAC + (INVERSE ? $clog2(N) : 0);
  localparam int CNTW  = $clog2(N * NE + 1);

  // ---- self-programming of the twiddle matrix
  logic [CNTW-1:0] init_cnt;
  logic            init_busy;
  logic [$clog2(ROWS)-1:0]  wr_row;
  logic [$clog2(NE)-1:0]    wr_elem;

  assign init_busy = (int'(init_cnt) < N * NE);
  assign wr_row    = $clog2(ROWS)'(int'(init_cnt) / NE);
  assign wr_elem   = $clog2(NE)'(int'(init_cnt) % NE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_cnt <= '0;
      ready    <= 1'b0;
    end else if (init_busy) begin
      init_cnt <= init_cnt + 1'b1;
    end else begin
      ready <= 1'b1;
    end
  end

  // ---- PEs
  cplx_t     pe_in [ACT_WL];
  logic      go;
  logic      pe_busy [NPE];
  logic      pe_done [NPE];
  logic      pe_clip [NPE];
  acc_cplx_t pe_out  [NPE][NE];

  assign go = start && ready && !busy;

  always_comb
    for (int r = 0; r < ACT_WL; r++)
      pe_in[r] = (r < N) ? in_vec[r] : '0;

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    cplx_t wr_data;
    int    k;
    assign k = p * NE + int'(wr_elem);
    assign wr_data = (k < N) ? twiddle(int'(wr_row) * k, N, INVERSE) : '0;

    crossbar_pe #(
      .ROWS(ROWS), .COLS(COLS), .CELL_BITS(CELL_BITS), .ACT_WL(ACT_WL),
      .ADC_BITS(ADC_BITS), .LANES(LANES)
    ) u_pe (
      .clk(clk), .rst_n(rst_n),
      .wr_en(init_busy), .wr_row(wr_row), .wr_elem(wr_elem), .wr_data(wr_data),
      .start(go), .grp('0), .real_only(real_only), .in_vec(pe_in),
      .busy(pe_busy[p]), .done(pe_done[p]), .out(pe_out[p]), .adc_clip(pe_clip[p])
    );
  end

  // all PEs run in lock step; PE 0 paces the tile
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      for (int k = 0; k < N; k++) out[k] <= '0;
    end else begin
      done <= 1'b0;
      if (go) busy <= 1'b1;
      if (pe_done[0]) begin
        busy <= 1'b0;
        done <= 1'b1;
        for (int k = 0; k < N; k++) begin
          out[k].re <= sat_shift(pe_out[k / NE][k % NE].re, SHIFT);
          out[k].im <= sat_shift(pe_out[k / NE][k % NE].im, SHIFT);
        end
      end
    end
  end

endmodule
