// crossbar_pe: one PSB-RNN processing element, a ReRAM crossbar with its
// DACs, sample & hold units, ADCs, shift-and-add unit, input buffer and output
// buffer. It computes a complex matrix-vector product
//     out[e] = sum_{r in group} in_vec[r] * W[grp*ACT_WL + r][e]
// for the NE = 8 complex weights of each wordline (32-bit complex weights,
// 16 columns of 2-bit cells each, 128 columns per wordline).
//
// How it works: a compute operation drives one group of ACT_WL (16) wordlines.
// The input vector is fed bit-serially, 2 bits per wordline per step through
// the DACs: first all slices of the real parts, then all slices of the
// imaginary parts (the latter skipped when real_only is set). Each slice is
// one crossbar read: the bitline sums are captured by the sample & hold bank,
// then converted LANES columns per clock by the ADC bank and folded into the
// shift-and-add accumulators, which also form the complex product
// (a+jb)(c+jd) = (r1 - r4) + j(r2 + r3). Real and imaginary weight parts sit
// in alternating adjacent columns, as the architecture prescribes.
//
// Timing: start is accepted in IDLE (busy low). Each slice takes 1 + COLS/LANES
// clocks; there are 9 slices per input part (8 two-bit digits and the sign),
// so an operation takes 2*9*17 + 2 = 308 clocks, or 9*17 + 2 = 155 with
// real_only, from the start clock to the done pulse. out holds the result
// until the next done. adc_clip pulses when an ADC clips (never at the
// default 8-bit resolution).
//
// Programming: a clock with wr_en high stores the complex weight wr_data at
// wordline wr_row, element wr_elem (columns 16*wr_elem .. 16*wr_elem+15).
module crossbar_pe
  import psb_pkg::*;
#(
  parameter int ROWS      = 128,
  parameter int COLS      = 128,
  parameter int CELL_BITS = 2,
  parameter int ACT_WL    = 16,
  parameter int ADC_BITS  = 8,
  parameter int LANES     = 8
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // weight programming
  input  logic                            wr_en,
  input  logic [$clog2(ROWS)-1:0]         wr_row,
  input  logic [$clog2(COLS/(2*DW/CELL_BITS))-1:0] wr_elem,
  input  cplx_t                           wr_data,
  // compute
  input  logic                            start,
  input  logic [$clog2(ROWS/ACT_WL)-1:0]  grp,
  input  logic                            real_only,
  input  cplx_t                           in_vec [ACT_WL],
  output logic                            busy,
  output logic                            done,
  output acc_cplx_t                       out [COLS/(2*DW/CELL_BITS)],
  output logic                            adc_clip
);

  localparam int ND     = DW / CELL_BITS;      // 2-bit digits per part
  localparam int EW     = 2 * ND;              // columns per element
  localparam int NE     = COLS / EW;           // elements per wordline
  localparam int NCG    = COLS / LANES;        // ADC column groups
  localparam int DMAX   = (1 << CELL_BITS) - 1;
  localparam int SUM_W  = $clog2(ACT_WL * DMAX * DMAX + 1);
  localparam int DSUM_W = $clog2(ACT_WL * DMAX + 1);
  localparam int GW     = $clog2(ROWS / ACT_WL);
  localparam int CGW    = $clog2(NCG);

  typedef enum logic [2:0] {S_IDLE, S_DRIVE, S_CONV, S_FLUSH, S_OUT} state_t;
  state_t state;

  cplx_t          inbuf [ACT_WL];   // input buffer
  logic [GW-1:0]  grp_r;
  logic           real_only_r;
  logic           part;             // 0: real parts of inputs, 1: imaginary
  logic [3:0]     slice;            // 0..ND-1 digits, ND sign bit
  logic [CGW-1:0] cg;

  logic [ACT_WL-1:0][CELL_BITS-1:0] dac_code;
  logic [DSUM_W-1:0]                dsum, dsum_r;

  // tags travelling with the ADC conversion
  logic [CGW-1:0]    cg_d;
  logic [3:0]        slice_d;
  logic              part_d;
  logic [DSUM_W-1:0] dsum_d;

  logic [COLS-1:0][SUM_W-1:0]     bitline, held;
  logic                           adc_valid;
  logic [LANES-1:0][ADC_BITS-1:0] code;
  acc_cplx_t                      sa_out [NE];

  // ---- weight encoding: alternating re/im digits, top digit offset by +2
  logic [EW-1:0][CELL_BITS-1:0] wr_cells;
  always_comb
    for (int d = 0; d < ND; d++) begin
      logic [CELL_BITS-1:0] dr, di;
      dr = wr_data.re[CELL_BITS*d +: CELL_BITS];
      di = wr_data.im[CELL_BITS*d +: CELL_BITS];
      if (d == ND - 1) begin
        dr[CELL_BITS-1] = ~dr[CELL_BITS-1];
        di[CELL_BITS-1] = ~di[CELL_BITS-1];
      end
      wr_cells[2*d]     = dr;
      wr_cells[2*d + 1] = di;
    end

  // ---- DAC codes for the current slice
  always_comb begin
    dsum = '0;
    for (int r = 0; r < ACT_WL; r++) begin
      word_t v;
      v = part ? inbuf[r].im : inbuf[r].re;
      if (state != S_DRIVE)            dac_code[r] = '0;
      else if (int'(slice) < ND)       dac_code[r] = v[CELL_BITS*int'(slice) +: CELL_BITS];
      else                             dac_code[r] = CELL_BITS'(v[DW-1]);
      dsum += DSUM_W'(dac_code[r]);
    end
  end

  xbar_array #(
    .ROWS(ROWS), .COLS(COLS), .CELL_BITS(CELL_BITS), .ACT_WL(ACT_WL),
    .WR_W(EW), .SUM_W(SUM_W)
  ) u_xbar (
    .clk(clk), .wr_en(wr_en), .wr_row(wr_row),
    .wr_col($clog2(COLS)'(int'(wr_elem) * EW)), .wr_cells(wr_cells),
    .grp(grp_r), .dac_code(dac_code), .col_sum(bitline)
  );

  sample_hold #(.COLS(COLS), .SUM_W(SUM_W)) u_sh (
    .clk(clk), .sample(state == S_DRIVE), .bitline(bitline), .hold_out(held)
  );

  adc #(.COLS(COLS), .SUM_W(SUM_W), .ADC_BITS(ADC_BITS), .LANES(LANES)) u_adc (
    .clk(clk), .rst_n(rst_n), .conv(state == S_CONV), .sel(cg), .held(held),
    .valid(adc_valid), .code(code), .clip(adc_clip)
  );

  shift_add #(
    .COLS(COLS), .CELL_BITS(CELL_BITS), .LANES(LANES), .ADC_BITS(ADC_BITS),
    .DSUM_W(DSUM_W)
  ) u_sa (
    .clk(clk), .rst_n(rst_n), .clear(start && state == S_IDLE), .en(adc_valid),
    .col_grp(cg_d), .slice(slice_d), .part(part_d), .dsum(dsum_d), .code(code),
    .out(sa_out)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      part        <= 1'b0;
      slice       <= '0;
      cg          <= '0;
      grp_r       <= '0;
      real_only_r <= 1'b0;
      dsum_r      <= '0;
      cg_d        <= '0;
      slice_d     <= '0;
      part_d      <= 1'b0;
      dsum_d      <= '0;
      done        <= 1'b0;
      for (int r = 0; r < ACT_WL; r++) inbuf[r] <= '0;
      for (int e = 0; e < NE; e++) out[e] <= '0;
    end else begin
      done    <= 1'b0;
      cg_d    <= cg;
      slice_d <= slice;
      part_d  <= part;
      dsum_d  <= dsum_r;
      unique case (state)
        S_IDLE: if (start) begin
          for (int r = 0; r < ACT_WL; r++) inbuf[r] <= in_vec[r];
          grp_r       <= grp;
          real_only_r <= real_only;
          part        <= 1'b0;
          slice       <= '0;
          state       <= S_DRIVE;
        end
        S_DRIVE: begin
          dsum_r <= dsum;
          cg     <= '0;
          state  <= S_CONV;
        end
        S_CONV: begin
          cg <= cg + 1'b1;
          if (int'(cg) == NCG - 1) begin
            if (int'(slice) < ND) begin
              slice <= slice + 1'b1;
              state <= S_DRIVE;
            end else if (!part && !real_only_r) begin
              slice <= '0;
              part  <= 1'b1;
              state <= S_DRIVE;
            end else begin
              state <= S_FLUSH;
            end
          end
        end
        S_FLUSH: state <= S_OUT;
        S_OUT: begin
          for (int e = 0; e < NE; e++) out[e] <= sa_out[e];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
