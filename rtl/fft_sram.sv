// fft_sram: FFT output SRAM, one bank per systolic-array row.
//
// Holds the frequency-domain input blocks that feed one row of the MVM
// systolic array: 16 input blocks (one per active wordline) of N = 8
// frequencies, 32-bit complex each, i.e. 128 words = 512 bytes, the size of
// the FFT output SRAM of the architecture. One write port and one read port;
// the read is synchronous (data one clock after the address). Contents are
// not reset.
module fft_sram
  import psb_pkg::*;
#(
  parameter int WORDS = 128
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] waddr,
  input  cplx_t                    wdata,
  input  logic                     re,
  input  logic [$clog2(WORDS)-1:0] raddr,
  output cplx_t                    rdata
);

  cplx_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
