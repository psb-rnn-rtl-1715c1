// sample_hold: behavioural model of the bank of bitline sample & hold units
// (one per crossbar column, 128 by default). It is a behavioural model of an
// analog circuit: the held bitline current is represented by its integer
// value.
//
// On a clock edge with sample high every unit captures its bitline; the held
// values stay on hold_out until the next sample, so the crossbar can start its
// next operation while the ADCs are still converting the previous one.
module sample_hold #(
  parameter int COLS  = 128,
  parameter int SUM_W = 8
) (
  input  logic                     clk,
  input  logic                     sample,
  input  logic [COLS-1:0][SUM_W-1:0] bitline,
  output logic [COLS-1:0][SUM_W-1:0] hold_out
);


  always_ff @(posedge clk)
    if (sample) hold_out <= bitline;

endmodule
