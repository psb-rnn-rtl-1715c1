// tanh_rlut: tanh by a range-addressable lookup table.
//
// Instead of one table entry per input code, the table stores the input
// ranges over which the output is constant: 32 boundaries
//   b_k = round(1024 * atanh((k - 0.5) / 32)),  k = 1..32,
// are compared with |x| in parallel, and the number of boundaries not above
// |x| addresses the output k/32 (tanh rounded to the nearest 1/32, error at
// most 1/64). The sign is restored afterwards (tanh is odd). The range-table
// approach follows the architecture; the 32 levels are this design's choice.
// Input and output are signed Q5.10; combinational.
module tanh_rlut
  import psb_pkg::*;
(
  input  word_t x,
  output word_t y,
  output logic  sat     // |x| beyond the last range: output is +-1
);

  localparam int NB = 32;
  localparam int unsigned BOUND [NB] = '{
    16, 48, 80, 112, 145, 178, 211, 245, 279, 313, 349, 385, 422, 461, 500, 541,
    584, 629, 675, 725, 777, 834, 894, 961, 1034, 1116, 1211, 1322, 1459, 1640,
    1910, 2480
  };

  logic [DW:0]  a;
  logic [5:0]   level;
  logic [DW:0]  ya;

  always_comb begin
    a = x[DW-1] ? (DW+1)'(-$signed({x[DW-1], x})) : {1'b0, x};
    level = '0;
    for (int k = 0; k < NB; k++)
      if (32'(a) >= BOUND[k]) level = 6'(k + 1);
    sat = (level == 6'(NB));
    ya  = (DW+1)'(level) << (FRAC - 5);
    y   = x[DW-1] ? word_t'(-$signed(ya)) : word_t'(ya);
  end

endmodule
