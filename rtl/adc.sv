// adc: behavioural model of the bank of ADCs of one crossbar PE. It is a
// behavioural model of an analog converter.
//
// The held bitline values are converted LANES columns per clock: on a clock
// with conv high, the LANES held values of column group sel are quantised to
// ADC_BITS bits and appear on code one clock later, with valid. A value above
// the converter's full scale is clipped to 2^ADC_BITS-1 and raises clip for
// that clock. The sequential scan of the held columns follows the
// architecture's S&H-to-ADC flow; the number of columns per clock is this
// design's choice (four 1.2 GS/s converters at a 650 MHz clock give about
// seven conversions per clock, rounded to 8).
module adc #(
  parameter int COLS     = 128,
  parameter int SUM_W    = 8,
  parameter int ADC_BITS = 8,
  parameter int LANES    = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         conv,
  input  logic [$clog2(COLS/LANES)-1:0] sel,
  input  logic [COLS-1:0][SUM_W-1:0]   held,
  output logic                         valid,
  output logic [LANES-1:0][ADC_BITS-1:0] code,
  output logic                         clip
);

  localparam int FULL = (1 << ADC_BITS) - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      clip  <= 1'b0;
      code  <= '0;
    end else begin
      valid <= conv;
      clip  <= 1'b0;
      if (conv)
        for (int l = 0; l < LANES; l++) begin
          logic [SUM_W-1:0] v;
          v = held[int'(sel) * LANES + l];
          if (32'(v) > FULL) begin
            code[l] <= ADC_BITS'(FULL);
            clip    <= 1'b1;
          end else begin
            code[l] <= ADC_BITS'(v);
          end
        end
    end
  end

endmodule
