// tb_xbar_array: self-checking test of the crossbar model. Programs random
// cells through the 16-cell write port (including partial overwrites), then
// for random wordline groups and DAC codes compares every bitline sum with
// the sum of code * cell computed from a copy of the array kept here.
module tb_xbar_array;
  localparam int ROWS = 128, COLS = 128, ACT_WL = 16;
  logic clk = 0;
  always #1 clk = ~clk;
  logic wr_en = 0;
  logic [6:0] wr_row = 0, wr_col = 0;
  logic [15:0][1:0] wr_cells = '0;
  logic [2:0] grp = 0;
  logic [ACT_WL-1:0][1:0] dac_code = '0;
  logic [COLS-1:0][7:0] col_sum;
  int model [ROWS][COLS];
  int checks = 0, failures = 0;

  xbar_array dut (.*);

  initial begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) model[r][c] = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      wr_en = 1;
      wr_row = 7'($urandom_range(0, ROWS - 1));
      wr_col = 7'($urandom_range(0, COLS - 1));
      for (int k = 0; k < 16; k++) begin
        wr_cells[k] = 2'($urandom);
        if (int'(wr_col) + k < COLS) model[wr_row][int'(wr_col) + k] = int'(wr_cells[k]);
      end
    end
    @(negedge clk) wr_en = 0;
    for (int t = 0; t < 40; t++) begin
      grp = 3'($urandom);
      for (int r = 0; r < ACT_WL; r++) dac_code[r] = 2'($urandom);
      if (t == 0) dac_code = '1;
      #1;
      for (int c = 0; c < COLS; c++) begin
        int s = 0;
        s = 0;
        for (int r = 0; r < ACT_WL; r++) s += int'(dac_code[r]) * model[int'(grp) * ACT_WL + r][c];
        checks++;
        if (int'(col_sum[c]) != s) begin
          failures++;
          if (failures < 10) $display("FAIL grp %0d col %0d got %0d exp %0d", grp, c, col_sum[c], s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
