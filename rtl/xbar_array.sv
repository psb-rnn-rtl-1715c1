// xbar_array: behavioural model of a ReRAM crossbar with its wordline DACs.
// This is a behavioural model of an analog macro, not synthesizable logic
// meant for a digital flow: it replaces the resistive array with a register
// array and Kirchhoff current summation with an integer sum.
//
// The array holds ROWS x COLS cells of CELL_BITS each (128 x 128 x 2 bits by
// default, as in the architecture). A compute operation activates one group
// of ACT_WL consecutive wordlines (at most 16 at a time, as the architecture
// requires); each active wordline is driven by a CELL_BITS-bit DAC code, and
// every bitline produces the sum over the active rows of code * cell value.
// Those bitline sums are the combinational output col_sum; the sample & hold
// stage that follows is a separate block.
//
// Programming: one write per clock stores WR_W adjacent cells of one
// wordline, starting at column wr_col. The cells start at zero (the model's
// choice: real cells keep their last programmed value).
module xbar_array #(
  parameter int ROWS      = 128,
  parameter int COLS      = 128,
  parameter int CELL_BITS = 2,
  parameter int ACT_WL    = 16,
  parameter int WR_W      = 16,
  parameter int SUM_W     = $clog2(ACT_WL * ((1 << CELL_BITS) - 1) * ((1 << CELL_BITS) - 1) + 1)
) (
  input  logic                          clk,
  // programming port
  input  logic                          wr_en,
  input  logic [$clog2(ROWS)-1:0]       wr_row,
  input  logic [$clog2(COLS)-1:0]       wr_col,
  input  logic [WR_W-1:0][CELL_BITS-1:0] wr_cells,
  // compute port: active wordline group and its DAC codes
  input  logic [$clog2(ROWS/ACT_WL)-1:0] grp,
  input  logic [ACT_WL-1:0][CELL_BITS-1:0] dac_code,
  output logic [COLS-1:0][SUM_W-1:0]    col_sum
);

  // one memory word per wordline
  typedef logic [COLS-1:0][CELL_BITS-1:0] wl_t;
  wl_t cells [ROWS];
  wl_t wr_word, wr_mask;
  wl_t act [ACT_WL];

  initial
    for (int r = 0; r < ROWS; r++) cells[r] = '0;

  // place the WR_W cells at column wr_col of the wordline
  always_comb begin
    wr_word = '0;
    wr_mask = '0;
    for (int k = 0; k < WR_W; k++)
      if (int'(wr_col) + k < COLS) begin
        wr_word[int'(wr_col) + k] = wr_cells[k];
        wr_mask[int'(wr_col) + k] = '1;
      end
  end

  always_ff @(posedge clk)
    if (wr_en) cells[wr_row] <= (cells[wr_row] & ~wr_mask) | (wr_word & wr_mask);

  // bitline current summation over the active wordline group
  always_comb begin
    for (int r = 0; r < ACT_WL; r++)
      act[r] = cells[int'(grp) * ACT_WL + r];
    for (int c = 0; c < COLS; c++) begin
      logic [SUM_W-1:0] s;
      s = '0;
      for (int r = 0; r < ACT_WL; r++)
        s += SUM_W'(dac_code[r]) * SUM_W'(act[r][c]);
      col_sum[c] = s;
    end
  end

endmodule
