// tb_fft_sram: self-checking test of the FFT output SRAM. Writes every word
// with random data, reads all back in a shuffled order, checks the data and
// the one-clock read latency, and checks that a simultaneous write to another
// word does not disturb a read.
module tb_fft_sram;
  import psb_pkg::*;
  localparam int WORDS = 128;

  logic clk = 0;
  always #1 clk = ~clk;
  logic we = 0, re = 0;
  logic [6:0] waddr = 0, raddr = 0;
  cplx_t wdata = '0, rdata;
  cplx_t model [WORDS];
  int checks = 0, failures = 0;

  fft_sram dut (.*);

  initial begin
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1; waddr = 7'(a); wdata = cplx_t'($urandom); model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 3 * WORDS; t++) begin
      int a, b;
      a = $urandom_range(0, WORDS - 1);
      b = (a + 1 + $urandom_range(0, WORDS - 2)) % WORDS;
      re = 1; raddr = 7'(a);
      we = (t % 2 == 1); waddr = 7'(b); wdata = cplx_t'($urandom);
      @(posedge clk);
      if (we) model[b] = wdata;
      #0.5;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", a, rdata, model[a]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
