// sigmoid_pwl: piecewise-linear sigmoid built from shifts, constants and one
// add, so the non-linear function reduces to combinational logic.
//
// The architecture uses a piecewise-linear sigmoid whose multiplications are
// replaced by simple transformations of the input bits; the segments below
// are the widely used PLAN approximation (slopes 1/4, 1/8, 1/32), which is
// this design's choice of segments:
//   |x| >= 5           : 1
//   2.375 <= |x| < 5   : |x|/32 + 0.84375
//   1 <= |x| < 2.375   : |x|/8  + 0.625
//   |x| < 1            : |x|/4  + 0.5
//   and sigmoid(-x) = 1 - sigmoid(x).
// Input and output are signed Q5.10; the output lies in [0, 1024].
// seg reports the segment used (0..3, innermost first) for coverage.
module sigmoid_pwl
  import psb_pkg::*;
(
  input  word_t       x,
  output word_t       y,
  output logic [1:0]  seg
);

  logic [DW:0] a;      // |x|, one bit wider so that |-32768| fits
  logic [DW:0] ya;

  always_comb begin
    a = x[DW-1] ? (DW+1)'(-$signed({x[DW-1], x})) : {1'b0, x};
    if (a >= (DW+1)'(5 << FRAC)) begin
      ya  = (DW+1)'(1 << FRAC);
      seg = 2'd3;
    end else if (a >= (DW+1)'(2432)) begin        // 2.375
      ya  = (a >> 5) + (DW+1)'(864);              // 0.84375
      seg = 2'd2;
    end else if (a >= (DW+1)'(1 << FRAC)) begin
      ya  = (a >> 3) + (DW+1)'(640);              // 0.625
      seg = 2'd1;
    end else begin
      ya  = (a >> 2) + (DW+1)'(512);              // 0.5
      seg = 2'd0;
    end
    y = x[DW-1] ? word_t'((DW+1)'(1 << FRAC) - ya) : word_t'(ya);
  end

endmodule
