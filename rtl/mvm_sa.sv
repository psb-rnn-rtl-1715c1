// mvm_sa: the input-weight MVM PE tile, a systolic array of SA_ROWS x SA_COLS
// crossbar PEs that performs the frequency-domain part of a block-circulant
// matrix-vector product,
//     R_i[k] = sum_j  F(w_ij)[k] * F(x_j)[k],
// for all block-rows i at one frequency k per operation.
//
// Weight layout (this design's reading of the architecture's mapping):
// PE(r, c) holds input blocks j = 16r .. 16r+15 and block-rows
// i = 8c .. 8c+7. Wordline k*16 + (j mod 16) holds F(w_ij)[k] in element
// i mod 8, so the weights sharing an input F(x_j)[k] share a wordline, the
// weights accumulated into one R_i[k] share a bitline, and wordline group k
// (16 wordlines, the most that are activated at once) serves frequency k.
// With 8 groups per 128-row crossbar a PE serves block sizes up to 8.
//
// Dataflow: start captures in_vec, the 16 frequency-domain inputs of each
// array row for frequency k. Inputs move horizontally: PE(r, c+1) receives
// its input register one clock after PE(r, c) starts. Row r starts one clock
// after row r-1, so results move vertically: each PE's output buffer adds its
// result to the output buffer of the PE above one clock after that PE
// finished. The bottom output buffers hold R_i[k]; done pulses when the last
// one is written: 309 + SA_ROWS + SA_COLS clocks after the start clock.
//
// Programming: wr_en writes complex weight wr_data into PE (wr_r, wr_c),
// wordline wr_row, element wr_elem.
module mvm_sa
  import psb_pkg::*;
#(
  parameter int SA_ROWS   = 2,
  parameter int SA_COLS   = 8,
  parameter int ROWS      = 128,
  parameter int COLS      = 128,
  parameter int CELL_BITS = 2,
  parameter int ACT_WL    = 16,
  parameter int ADC_BITS  = 8,
  parameter int LANES     = 8,
  localparam int NE       = COLS / (2 * DW / CELL_BITS),
  localparam int RW       = (SA_ROWS > 1) ? $clog2(SA_ROWS) : 1,
  localparam int CW       = (SA_COLS > 1) ? $clog2(SA_COLS) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // weight programming
  input  logic                           wr_en,
  input  logic [RW-1:0]                  wr_r,
  input  logic [CW-1:0]                  wr_c,
  input  logic [$clog2(ROWS)-1:0]        wr_row,
  input  logic [$clog2(NE)-1:0]          wr_elem,
  input  cplx_t                          wr_data,
  // compute
  input  logic                           start,
  input  logic [$clog2(ROWS/ACT_WL)-1:0] k,
  input  cplx_t                          in_vec [SA_ROWS][ACT_WL],
  output logic                           busy,
  output logic                           done,
  output acc_cplx_t                      out [SA_COLS][NE]
);

  localparam int GW = $clog2(ROWS / ACT_WL);

  logic          go    [SA_ROWS][SA_COLS];   // PE start token
  cplx_t         dreg  [SA_ROWS][SA_COLS][ACT_WL]; // PE input registers
  acc_cplx_t     obuf  [SA_ROWS][SA_COLS][NE];     // PE output buffers
  logic          ovld  [SA_ROWS][SA_COLS];
  logic          pe_done [SA_ROWS][SA_COLS];
  logic          pe_busy [SA_ROWS][SA_COLS];
  logic          pe_clip [SA_ROWS][SA_COLS];
  acc_cplx_t     pe_out  [SA_ROWS][SA_COLS][NE];
  logic [GW-1:0] k_r;
  logic          accept;

  assign accept = start && !busy;

  for (genvar r = 0; r < SA_ROWS; r++) begin : g_row
    for (genvar c = 0; c < SA_COLS; c++) begin : g_col
      logic pe_wr;
      assign pe_wr = wr_en && (int'(wr_r) == r) && (int'(wr_c) == c);

      crossbar_pe #(
        .ROWS(ROWS), .COLS(COLS), .CELL_BITS(CELL_BITS), .ACT_WL(ACT_WL),
        .ADC_BITS(ADC_BITS), .LANES(LANES)
      ) u_pe (
        .clk(clk), .rst_n(rst_n),
        .wr_en(pe_wr), .wr_row(wr_row), .wr_elem(wr_elem), .wr_data(wr_data),
        .start(go[r][c]), .grp(k_r), .real_only(1'b0), .in_vec(dreg[r][c]),
        .busy(pe_busy[r][c]), .done(pe_done[r][c]), .out(pe_out[r][c]),
        .adc_clip(pe_clip[r][c])
      );

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          go[r][c]   <= 1'b0;
          ovld[r][c] <= 1'b0;
          for (int w = 0; w < ACT_WL; w++) dreg[r][c][w] <= '0;
          for (int e = 0; e < NE; e++) obuf[r][c][e] <= '0;
        end else begin
          // start tokens and inputs: down the first column, then rightwards
          if (c == 0) begin
            go[r][c] <= (r == 0) ? accept : go[(r > 0) ? r - 1 : 0][0];
            if ((r == 0) ? accept : go[(r > 0) ? r - 1 : 0][0])
              for (int w = 0; w < ACT_WL; w++) dreg[r][c][w] <= in_vec[r][w];
          end else begin
            go[r][c] <= go[r][(c > 0) ? c - 1 : 0];
            if (go[r][(c > 0) ? c - 1 : 0])
              for (int w = 0; w < ACT_WL; w++) dreg[r][c][w] <= dreg[r][(c > 0) ? c - 1 : 0][w];
          end
          // vertical accumulation through the output buffers
          ovld[r][c] <= pe_done[r][c];
          if (pe_done[r][c])
            for (int e = 0; e < NE; e++) begin
              if (r == 0) obuf[r][c][e] <= pe_out[r][c][e];
              else begin
                obuf[r][c][e].re <= pe_out[r][c][e].re + obuf[(r > 0) ? r - 1 : 0][c][e].re;
                obuf[r][c][e].im <= pe_out[r][c][e].im + obuf[(r > 0) ? r - 1 : 0][c][e].im;
              end
            end
        end
      end
    end
  end

  // Row r's inputs are held in in_vec until its first-column PE loads them;
  // the caller keeps in_vec stable while busy.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      k_r  <= '0;
    end else begin
      done <= 1'b0;
      if (accept) begin
        busy <= 1'b1;
        k_r  <= k;
      end
      if (ovld[SA_ROWS-1][SA_COLS-1]) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  always_comb
    for (int c = 0; c < SA_COLS; c++)
      for (int e = 0; e < NE; e++)
        out[c][e] = obuf[SA_ROWS-1][c][e];

endmodule
