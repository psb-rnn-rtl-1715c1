// psb_pkg: types, number formats and helper functions shared by the PSB-RNN
// blocks.
//
// Number formats (this design's choice; the architecture fixes only the
// 32-bit complex weight, i.e. 16-bit real + 16-bit imaginary parts):
//   * activations, hidden and cell state, FFT outputs : signed Q5.10
//   * DFT / IDFT twiddle factors in the FFT/IFFT tiles : signed Q1.14
//   * frequency-domain weights in the MVM systolic array: signed Q3.12
// The twiddle table covers DFT sizes that divide 16 (2, 4, 8, 16), which
// includes the block sizes 8 and 16 evaluated for the architecture.
package psb_pkg;

  localparam int DW      = 16;  // width of one real or imaginary part
  localparam int FRAC    = 10;  // fraction bits of activations / state
  localparam int TW_FRAC = 14;  // fraction bits of twiddle factors
  localparam int WF_FRAC = 12;  // fraction bits of frequency-domain weights
  localparam int ACC_W   = 48;  // width of a PE's full-precision result

  typedef logic signed [DW-1:0] word_t;

  // One 32-bit complex value: the unit stored in 16 adjacent crossbar columns.
  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // Full-precision complex PE result.
  typedef struct packed {
    logic signed [ACC_W-1:0] re;
    logic signed [ACC_W-1:0] im;
  } acc_cplx_t;

  // cos(2*pi*a/16) in Q1.14, a = 0..15.
  function automatic word_t cos16(input int a);
    int b;
    word_t q;
    b = a % 16;
    if (b < 0) b += 16;
    // quarter wave: round(16384*cos(pi*m/8)), m = 0..4
    case ((b <= 4) ? b : (b <= 8) ? 8 - b : (b <= 12) ? b - 8 : 16 - b)
      0:       q = 16'sd16384;
      1:       q = 16'sd15137;
      2:       q = 16'sd11585;
      3:       q = 16'sd6270;
      default: q = 16'sd0;
    endcase
    return (b > 4 && b < 12) ? -q : q;
  endfunction

  // Twiddle exp(-+ j*2*pi*idx/n) in Q1.14; inverse selects the + sign.
  // n must divide 16.
  function automatic cplx_t twiddle(input int idx, input int n, input bit inverse);
    cplx_t t;
    int a;
    a = ((idx % n) * (16 / n)) % 16;
    t.re = cos16(a);
    // sin(x) = cos(x - pi/2); forward DFT uses -sin
    t.im = inverse ? cos16(a - 4) : -cos16(a - 4);
    return t;
  endfunction

  // Arithmetic shift right then saturate to a 16-bit word.
  function automatic word_t sat_shift(input logic signed [ACC_W-1:0] v, input int sh);
    logic signed [ACC_W-1:0] s;
    s = v >>> sh;
    if (s > 48'sd32767)       return 16'sh7fff;
    else if (s < -48'sd32768) return 16'sh8000;
    else                      return s[DW-1:0];
  endfunction

endpackage
