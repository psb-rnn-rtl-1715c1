// shift_add: the shift-and-add (S&A) unit of a crossbar PE, including the
// complex merge of the four real partial products.
//
// Operands are bit-sliced twice. Each 16-bit weight part (real or imaginary)
// occupies ND = 8 cells of 2 bits; in each element the real and imaginary
// cells alternate (column 16e+2d holds real digit d, 16e+2d+1 imaginary digit
// d). Inputs are fed 2 bits at a time: slices 0..7 carry the digits of the
// input part, slice 8 carries its two's-complement sign bit. Signed weights
// use a radix-4 ("4's complement") code: the top digit is stored offset by +2,
// so its signed value is stored-2; the unit removes that offset with the sum
// of the DAC codes of the operation (dsum).
//
// Per ADC result for column (e, m, d) of slice s and input part p:
//   t = code*4^d - [d==ND-1]*2*4^(ND-1)*dsum
//   P[e][p][m] += t*4^s   (s < ND),   P[e][p][m] -= t*2^16   (s == ND)
// With input a+jb and weight c+jd, P holds r1=a*c, r2=a*d, r3=b*c, r4=b*d,
// and the result is e = r1 - r4, f = r2 + r3.
//
// Interface: clear zeroes the accumulators; on a clock with en high the
// LANES codes of column group col_grp are accumulated. The result out is a
// combinational function of the accumulators.
module shift_add
  import psb_pkg::*;
#(
  parameter int COLS      = 128,
  parameter int CELL_BITS = 2,
  parameter int LANES     = 8,
  parameter int ADC_BITS  = 8,
  parameter int DSUM_W    = 6
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          en,
  input  logic [$clog2(COLS/LANES)-1:0] col_grp,
  input  logic [3:0]                    slice,
  input  logic                          part,
  input  logic [DSUM_W-1:0]             dsum,
  input  logic [LANES-1:0][ADC_BITS-1:0] code,
  output acc_cplx_t                     out [COLS/(2*DW/CELL_BITS)]
);

  localparam int ND = DW / CELL_BITS;     // digits per weight part
  localparam int EW = 2 * ND;             // columns per complex element
  localparam int NE = COLS / EW;          // elements per wordline
  localparam logic signed [ACC_W-1:0] OFFS = ACC_W'(1 << (CELL_BITS - 1));

  logic signed [ACC_W-1:0] acc   [NE][2][2];
  logic signed [ACC_W-1:0] delta [NE][2];

  // sum of this clock's lane contributions per element and weight part
  always_comb begin
    automatic int c, ei, m, d;
    automatic logic signed [ACC_W-1:0] t;
    for (int e = 0; e < NE; e++) begin
      delta[e][0] = '0;
      delta[e][1] = '0;
    end
    for (int l = 0; l < LANES; l++) begin
      c  = int'(col_grp) * LANES + l;
      ei = c / EW;
      m = c % 2;
      d = (c % EW) / 2;
      t = ACC_W'(code[l]) <<< (CELL_BITS * d);
      if (d == ND - 1)
        t = t - ((OFFS * ACC_W'(dsum)) <<< (CELL_BITS * d));
      if (int'(slice) < ND) t = t <<< (CELL_BITS * int'(slice));
      else                  t = -(t <<< DW);
      delta[ei][m] = delta[ei][m] + t;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < NE; e++)
        for (int p = 0; p < 2; p++)
          for (int m = 0; m < 2; m++)
            acc[e][p][m] <= '0;
    end else if (clear) begin
      for (int e = 0; e < NE; e++)
        for (int p = 0; p < 2; p++)
          for (int m = 0; m < 2; m++)
            acc[e][p][m] <= '0;
    end else if (en) begin
      for (int e = 0; e < NE; e++)
        for (int m = 0; m < 2; m++)
          acc[e][part][m] <= acc[e][part][m] + delta[e][m];
    end
  end

  always_comb
    for (int e = 0; e < NE; e++) begin
      out[e].re = acc[e][0][0] - acc[e][1][1];
      out[e].im = acc[e][0][1] + acc[e][1][0];
    end

endmodule
