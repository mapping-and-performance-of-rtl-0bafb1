// tb_mg_twiddle_lut: self-checking test of the twiddle table.
// All 256 exponents k; w must be cos(2 pi k/256) and -sin(2 pi k/256) scaled
// by 32767, within one LSB of the real-valued result, one cycle after k.
module tb_mg_twiddle_lut;
  import mg_pkg::*;
  localparam real PI = 3.14159265358979;
  logic       clk = 0, rst_n = 0;
  logic [7:0] k;
  cplx16_t    w;
  int checks = 0, failures = 0;

  mg_twiddle_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      real wr, wi;
      k = 8'(i);
      @(posedge clk); #1;
      wr = 32767.0 * $cos(2.0 * PI * i / 256.0);
      wi = -32767.0 * $sin(2.0 * PI * i / 256.0);
      checks++;
      if (real'(w.re) - wr > 1.0 || wr - real'(w.re) > 1.0 ||
          real'(w.im) - wi > 1.0 || wi - real'(w.im) > 1.0) begin
        failures++; $display("FAIL k=%0d got %0d %0d want %f %f", i, w.re, w.im, wr, wi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
