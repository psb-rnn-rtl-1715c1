// lstm_lane: one lane of the activation units and scalar arithmetic, which
// fuse the four gate outputs of the MVM/IFFT pipeline into the new cell state
// and hidden state of one LSTM element (Eq. (1) of the architecture):
//   f = sigmoid(pf + wfc*c' + bf)     i = sigmoid(pi + wic*c' + bi)
//   o = sigmoid(po + woc*c' + bo)     g = sigmoid(pg + bg)
//   c = f*c' + i*g                    h = o * tanh(c)
// where p* are the gate MVM results, w*c the diagonal peephole weights and c'
// the previous cell state. The cell-gate activation is a sigmoid as printed
// in the architecture's equation. The output projection h = phi(W m + b) of
// the Google LSTM variant is not part of this lane: h is m.
// A lane has 4 sigmoid units, 1 tanh unit and 6 multipliers; 4 lanes give the
// 16 sigmoid and 4 tanh units of the architecture.
//
// All values are signed Q5.10; products are truncated back to Q5.10 and
// sums saturate. Two pipeline stages: in_valid to out_valid is 2 clocks.
module lstm_lane
  import psb_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t pre [4],     // gate MVM results: 0 f, 1 i, 2 o, 3 g
  input  word_t bias [4],
  input  word_t peep [3],    // peephole weights for f, i, o
  input  word_t c_prev,
  output logic  out_valid,
  output word_t c_out,
  output word_t h_out,
  output logic [1:0] sig_seg [4],  // sigmoid segment per gate (coverage)
  output logic  tanh_sat
);

  function automatic word_t sat16(input logic signed [33:0] v);
    if (v > 34'sd32767)       return 16'sh7fff;
    else if (v < -34'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

  function automatic logic signed [33:0] mulq(input word_t a, input word_t b);
    logic signed [31:0] p;
    p = a * b;
    return 34'(p >>> FRAC);
  endfunction

  // ---- stage 1: gate pre-activations and sigmoids
  word_t zin [4];
  word_t act [4];
  always_comb
    for (int g = 0; g < 4; g++)
      zin[g] = sat16(34'(pre[g]) + 34'(bias[g]) + ((g < 3) ? mulq(peep[(g < 3) ? g : 0], c_prev) : 34'sd0));

  for (genvar g = 0; g < 4; g++) begin : g_sig
    sigmoid_pwl u_sig (.x(zin[g]), .y(act[g]), .seg(sig_seg[g]));
  end

  word_t f_r, i_r, o_r, g_r, c_prev_r;
  logic  v1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; f_r <= '0; i_r <= '0; o_r <= '0; g_r <= '0; c_prev_r <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) begin
        f_r <= act[0]; i_r <= act[1]; o_r <= act[2]; g_r <= act[3];
        c_prev_r <= c_prev;
      end
    end
  end

  // ---- stage 2: cell state, tanh, hidden state
  word_t c_new, t_c;
  assign c_new = sat16(mulq(f_r, c_prev_r) + mulq(i_r, g_r));
  tanh_rlut u_tanh (.x(c_new), .y(t_c), .sat(tanh_sat));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; c_out <= '0; h_out <= '0;
    end else begin
      out_valid <= v1;
      if (v1) begin
        c_out <= c_new;
        h_out <= sat16(mulq(o_r, t_c));
      end
    end
  end

endmodule
