// psb_rnn_top: PSB-RNN, an LSTM inference engine whose matrix-vector products
// use block-circulant weights and run entirely in ReRAM crossbar PEs.
//
// Every gate weight matrix W (4*HID x (IN_DIM+HID)) is made of N x N circulant
// blocks, so W*u reduces to DFTs, per-frequency complex multiply-accumulates
// and IDFTs:  R_i = IDFT( sum_j F(w_ij) . F(u_j) ).  All three steps are
// crossbar matrix-vector products:
//   1. FFT PE tile     - F(u_j) for every input block u_j of u = [x_t; h_t-1]
//                        (real input, so imaginary slices are skipped); the
//                        results go to the FFT output SRAM bank of the array
//                        row that consumes them.
//   2. MVM PE tile     - the systolic array mvm_sa; one operation per
//                        frequency k computes R_i[k] for all block-rows i.
//                        F(w_ij) are precomputed off-line and programmed
//                        through the w_* port.
//   3. IFFT PE tile    - R_i back to the time domain, one block-row at a time.
//   4. activation units and scalar arithmetic - LANES lstm_lane instances
//                        produce c_t and h_t from the four gate results.
// Block-rows of the four gates are interleaved: block-row i = 4*b + g holds
// gate g (0 f, 1 i, 2 o, 3 g) of hidden elements b*N .. b*N+N-1.
//
// The phases run one after another for each time step (the architecture
// pipelines them; here they are sequenced by one controller, this design's
// simplification). Interface: after reset wait for ready (the FFT and IFFT
// tiles program their twiddle factors). Program weights (w_*), biases and
// peephole weights (p_*), write x_t (x_*), pulse start; done pulses when
// h_out and c_out hold the new state, which becomes h_t-1 and c_t-1 of the
// next start. clear_state zeroes h and c. All data are signed Q5.10; MVM
// weights are complex Q3.12.
//
// Default size: block size N = 8 and 128 inputs and 128 hidden units (a
// 128-hidden-unit LSTM as in the NLP and HAR benchmarks), giving a 2 x 8 PE
// systolic array plus one FFT and one IFFT PE.
module psb_rnn_top
  import psb_pkg::*;
#(
  parameter int N      = 8,
  parameter int IN_DIM = 128,
  parameter int HID    = 128,
  parameter int LANES  = 4,
  localparam int Q       = (IN_DIM + HID) / N,   // input blocks
  localparam int P       = 4 * HID / N,          // block-rows of all 4 gates
  localparam int SA_ROWS = (Q + 15) / 16,
  localparam int SA_COLS = (P + 7) / 8,
  localparam int RW      = (SA_ROWS > 1) ? $clog2(SA_ROWS) : 1,
  localparam int CW      = (SA_COLS > 1) ? $clog2(SA_COLS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic                   ready,
  // MVM weight programming: F(w_ij)[k] goes to PE (j/16, i/8),
  // wordline k*16 + j%16, element i%8
  input  logic                   w_wr_en,
  input  logic [RW-1:0]          w_wr_r,
  input  logic [CW-1:0]          w_wr_c,
  input  logic [6:0]             w_wr_row,
  input  logic [2:0]             w_wr_elem,
  input  cplx_t                  w_wr_data,
  // bias (p_wr_kind 0, gates 0..3) and peephole (p_wr_kind 1, gates 0..2)
  input  logic                   p_wr_en,
  input  logic                   p_wr_kind,
  input  logic [1:0]             p_wr_gate,
  input  logic [$clog2(HID)-1:0] p_wr_addr,
  input  word_t                  p_wr_data,
  // input vector x_t
  input  logic                   x_wr_en,
  input  logic [$clog2(IN_DIM)-1:0] x_wr_addr,
  input  word_t                  x_wr_data,
  // control
  input  logic                   clear_state,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output word_t                  h_out [HID],
  output word_t                  c_out [HID]
);

  localparam int SW = $clog2(16 * N);   // SRAM bank address width

  // ---------------------------------------------------------------- storage
  word_t x_mem [IN_DIM];
  word_t bias_mem [4][HID];
  word_t peep_mem [3][HID];
  cplx_t r_mem [P][N];        // MVM results R_i[k], input of the IFFT tile
  word_t pre_mem [P * N];     // gate results from the IFFT tile

  typedef enum logic [3:0] {
    S_IDLE, S_FFT_GO, S_FFT_WAIT, S_FFT_WR, S_MVM_RD, S_MVM_GO, S_MVM_WAIT,
    S_IFFT_GO, S_IFFT_WAIT, S_ACT, S_ACT_DRAIN, S_DONE
  } state_t;
  state_t state;

  logic [15:0] j_cnt;     // input block / block-row / hidden element counter
  logic [15:0] k_cnt;     // frequency / word counter

  function automatic word_t u_at(input int idx, input word_t h_v [HID]);
    int a;
    a = idx % (IN_DIM + HID);
    return (a < IN_DIM) ? x_mem[a] : h_v[a - IN_DIM];
  endfunction

  // ---------------------------------------------------------------- FFT tile
  logic  fft_ready, fft_busy, fft_done;
  cplx_t fft_in [N], fft_out [N];

  always_comb
    for (int r = 0; r < N; r++) begin
      fft_in[r].re = u_at(int'(j_cnt) * N + r, h_out);
      fft_in[r].im = '0;
    end

  dft_tile #(.N(N), .INVERSE(1'b0)) u_fft (
    .clk(clk), .rst_n(rst_n), .ready(fft_ready), .start(state == S_FFT_GO),
    .real_only(1'b1), .in_vec(fft_in), .busy(fft_busy), .done(fft_done),
    .out(fft_out)
  );

  // ------------------------------------------------------ FFT output SRAMs
  logic            sr_we [SA_ROWS];
  logic [SW-1:0]   sr_waddr, sr_raddr;
  cplx_t           sr_wdata;
  logic            sr_re;
  cplx_t           sr_rdata [SA_ROWS];
  cplx_t           fft_hold [N];

  assign sr_waddr = SW'((int'(j_cnt) % 16) * N + int'(k_cnt));
  assign sr_wdata = fft_hold[k_cnt[$clog2(N)-1:0]];
  assign sr_re    = (state == S_MVM_RD) && (int'(j_cnt) < 16);
  assign sr_raddr = SW'(int'(j_cnt[3:0]) * N + int'(k_cnt));

  for (genvar r = 0; r < SA_ROWS; r++) begin : g_sram
    assign sr_we[r] = (state == S_FFT_WR) && (int'(j_cnt) / 16 == r);
    fft_sram #(.WORDS(16 * N)) u_sram (
      .clk(clk), .we(sr_we[r]), .waddr(sr_waddr), .wdata(sr_wdata),
      .re(sr_re), .raddr(sr_raddr), .rdata(sr_rdata[r])
    );
  end

  // ------------------------------------------------------ MVM systolic array
  cplx_t     sa_in [SA_ROWS][16];
  logic      sa_busy, sa_done;
  acc_cplx_t sa_out [SA_COLS][8];

  mvm_sa #(.SA_ROWS(SA_ROWS), .SA_COLS(SA_COLS)) u_sa (
    .clk(clk), .rst_n(rst_n),
    .wr_en(w_wr_en), .wr_r(w_wr_r), .wr_c(w_wr_c), .wr_row(w_wr_row),
    .wr_elem(w_wr_elem), .wr_data(w_wr_data),
    .start(state == S_MVM_GO), .k(3'(k_cnt)), .in_vec(sa_in),
    .busy(sa_busy), .done(sa_done), .out(sa_out)
  );

  // --------------------------------------------------------------- IFFT tile
  logic  ifft_ready, ifft_busy, ifft_done;
  cplx_t ifft_in [N], ifft_out [N];

  always_comb
    for (int k = 0; k < N; k++)
      ifft_in[k] = r_mem[int'(j_cnt) % P][k];

  dft_tile #(.N(N), .INVERSE(1'b1)) u_ifft (
    .clk(clk), .rst_n(rst_n), .ready(ifft_ready), .start(state == S_IFFT_GO),
    .real_only(1'b0), .in_vec(ifft_in), .busy(ifft_busy), .done(ifft_done),
    .out(ifft_out)
  );

  assign ready = fft_ready && ifft_ready;

  // ------------------------------------ activation units / scalar arithmetic
  logic  ln_valid;
  word_t ln_pre  [LANES][4];
  word_t ln_bias [LANES][4];
  word_t ln_peep [LANES][3];
  word_t ln_c    [LANES];
  logic  ln_ovalid [LANES];
  word_t ln_cout [LANES], ln_hout [LANES];
  logic [1:0] ln_seg [LANES][4];
  logic  ln_tsat [LANES];
  logic [15:0] wb_base [2];   // element index of the lane outputs, per stage

  assign ln_valid = (state == S_ACT);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    int e, b, m;
    assign e = (int'(j_cnt) + l) % HID;
    assign b = e / N;
    assign m = e % N;
    always_comb begin
      for (int g = 0; g < 4; g++) begin
        ln_pre[l][g]  = pre_mem[(b * 4 + g) * N + m];
        ln_bias[l][g] = bias_mem[g][e];
      end
      for (int g = 0; g < 3; g++) ln_peep[l][g] = peep_mem[g][e];
      ln_c[l] = c_out[e];
    end
    lstm_lane u_lane (
      .clk(clk), .rst_n(rst_n), .in_valid(ln_valid), .pre(ln_pre[l]),
      .bias(ln_bias[l]), .peep(ln_peep[l]), .c_prev(ln_c[l]),
      .out_valid(ln_ovalid[l]), .c_out(ln_cout[l]), .h_out(ln_hout[l]),
      .sig_seg(ln_seg[l]), .tanh_sat(ln_tsat[l])
    );
  end

  // ------------------------------------------------------- parameter writes
  always_ff @(posedge clk) begin
    if (x_wr_en) x_mem[x_wr_addr] <= x_wr_data;
    if (p_wr_en) begin
      if (!p_wr_kind)            bias_mem[p_wr_gate][p_wr_addr] <= p_wr_data;
      else if (p_wr_gate != 2'd3) peep_mem[p_wr_gate][p_wr_addr] <= p_wr_data;
    end
  end

  // --------------------------------------------------------------- control
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      j_cnt <= '0;
      k_cnt <= '0;
      done  <= 1'b0;
      wb_base[0] <= '0;
      wb_base[1] <= '0;
      for (int e = 0; e < HID; e++) begin
        h_out[e] <= '0;
        c_out[e] <= '0;
      end
      for (int k = 0; k < N; k++) fft_hold[k] <= '0;
      for (int r = 0; r < SA_ROWS; r++)
        for (int w = 0; w < 16; w++) sa_in[r][w] <= '0;
      for (int i = 0; i < P; i++)
        for (int k = 0; k < N; k++) r_mem[i][k] <= '0;
      for (int a = 0; a < P * N; a++) pre_mem[a] <= '0;
    end else begin
      done <= 1'b0;
      wb_base[0] <= j_cnt;
      wb_base[1] <= wb_base[0];
      if (ln_ovalid[0])
        for (int l = 0; l < LANES; l++) begin
          c_out[(int'(wb_base[1]) + l) % HID] <= ln_cout[l];
          h_out[(int'(wb_base[1]) + l) % HID] <= ln_hout[l];
        end
      unique case (state)
        S_IDLE: begin
          if (clear_state)
            for (int e = 0; e < HID; e++) begin
              h_out[e] <= '0;
              c_out[e] <= '0;
            end
          if (start && ready) begin
            j_cnt <= '0;
            state <= S_FFT_GO;
          end
        end
        // ---- 1. FFT of each input block into the SRAM bank of its array row
        S_FFT_GO:   state <= S_FFT_WAIT;
        S_FFT_WAIT: if (fft_done) begin
          for (int k = 0; k < N; k++) fft_hold[k] <= fft_out[k];
          k_cnt <= '0;
          state <= S_FFT_WR;
        end
        S_FFT_WR: begin
          k_cnt <= k_cnt + 1'b1;
          if (int'(k_cnt) == N - 1) begin
            if (int'(j_cnt) == Q - 1) begin
              j_cnt <= '0;
              k_cnt <= '0;
              state <= S_MVM_RD;
            end else begin
              j_cnt <= j_cnt + 1'b1;
              state <= S_FFT_GO;
            end
          end
        end
        // ---- 2. per frequency: gather 16 inputs per array row, run the array
        S_MVM_RD: begin
          j_cnt <= j_cnt + 1'b1;
          if (int'(j_cnt) >= 1)
            for (int r = 0; r < SA_ROWS; r++)
              sa_in[r][int'(j_cnt) - 1] <= (r * 16 + int'(j_cnt) - 1 < Q) ? sr_rdata[r] : '0;
          if (int'(j_cnt) == 16) state <= S_MVM_GO;
        end
        S_MVM_GO:   state <= S_MVM_WAIT;
        S_MVM_WAIT: if (sa_done) begin
          for (int c = 0; c < SA_COLS; c++)
            for (int e = 0; e < 8; e++)
              if (c * 8 + e < P) begin
                r_mem[c * 8 + e][k_cnt[$clog2(N)-1:0]].re <= sat_shift(sa_out[c][e].re, WF_FRAC);
                r_mem[c * 8 + e][k_cnt[$clog2(N)-1:0]].im <= sat_shift(sa_out[c][e].im, WF_FRAC);
              end
          j_cnt <= '0;
          if (int'(k_cnt) == N - 1) state <= S_IFFT_GO;
          else begin
            k_cnt <= k_cnt + 1'b1;
            state <= S_MVM_RD;
          end
        end
        // ---- 3. IFFT of each block-row
        S_IFFT_GO:   state <= S_IFFT_WAIT;
        S_IFFT_WAIT: if (ifft_done) begin
          for (int m = 0; m < N; m++) pre_mem[int'(j_cnt) * N + m] <= ifft_out[m].re;
          if (int'(j_cnt) == P - 1) begin
            j_cnt <= '0;
            state <= S_ACT;
          end else begin
            j_cnt <= j_cnt + 1'b1;
            state <= S_IFFT_GO;
          end
        end
        // ---- 4. activations and state update, LANES elements per clock
        S_ACT: begin
          j_cnt <= j_cnt + 16'(LANES);
          if (int'(j_cnt) + LANES >= HID) begin
            k_cnt <= '0;
            state <= S_ACT_DRAIN;
          end
        end
        // the lanes are two clocks deep
        S_ACT_DRAIN: begin
          k_cnt <= k_cnt + 1'b1;
          if (k_cnt == 16'd1) state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
