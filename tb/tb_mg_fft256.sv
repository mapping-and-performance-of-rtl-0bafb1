// tb_mg_fft256: self-checking test of the 256-point radix-4 FFT.
// Two transforms: a single tone (energy in one bin only) and random samples of
// complex magnitude below 1. Samples are loaded in natural order, the
// transform must take exactly 524 cycles from start to done (4 stages of
// 131), and every one of the 256 results must match the DFT divided by 256,
// computed here in real arithmetic, within 4 LSBs.
module tb_mg_fft256;
  import mg_pkg::*;
  localparam int N = 256;
  localparam real PI = 3.14159265358979;
  logic       clk = 0, rst_n = 0;
  logic       load_en, start, busy, done;
  logic [7:0] load_idx, rd_idx;
  cplx16_t    load_data, rd_data;
  real        sr [N], si [N];
  int checks = 0, failures = 0, cyc = 0;

  mg_fft256 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input int kind);
    int t0, maxerr;
    for (int n = 0; n < N; n++) begin
      if (kind == 0) begin
        sr[n] = real'(int'(16000.0 * $cos(2.0 * PI * 37 * n / N)));
        si[n] = real'(int'(16000.0 * $sin(2.0 * PI * 37 * n / N)));
      end else begin
        real ang, mag;
        ang = 2.0 * PI * $urandom_range(0, 9999) / 10000.0;
        mag = 32000.0 * $urandom_range(0, 10000) / 10000.0;
        sr[n] = real'(int'(mag * $cos(ang)));
        si[n] = real'(int'(mag * $sin(ang)));
      end
    end
    for (int n = 0; n < N; n++) begin
      load_en = 1; load_idx = 8'(n);
      load_data.re = 16'(int'(sr[n])); load_data.im = 16'(int'(si[n]));
      @(posedge clk); #1;
    end
    load_en = 0;
    start = 1; t0 = cyc;
    @(posedge clk); #1;
    start = 0;
    while (!done) begin @(posedge clk); #1; end
    checks++;
    if (cyc - t0 != 524) begin failures++; $display("FAIL transform took %0d cycles", cyc - t0); end
    $display("transform %0d: %0d cycles", kind, cyc - t0);
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    maxerr = 0;
    for (int k = 0; k < N; k++) begin
      real xr, xi, er, ei;
      rd_idx = 8'(k);
      @(posedge clk); #1;
      xr = 0; xi = 0;
      for (int n = 0; n < N; n++) begin
        real c, s;
        c = $cos(2.0 * PI * ((k * n) % N) / N);
        s = $sin(2.0 * PI * ((k * n) % N) / N);
        xr += sr[n] * c + si[n] * s;
        xi += si[n] * c - sr[n] * s;
      end
      er = real'(rd_data.re) - xr / N;
      ei = real'(rd_data.im) - xi / N;
      checks++;
      if (er > 4.0 || er < -4.0 || ei > 4.0 || ei < -4.0) begin
        failures++;
        if (failures < 10) $display("FAIL X[%0d] got %0d %0d want %f %f", k, rd_data.re, rd_data.im, xr/N, xi/N);
      end
    end
  endtask

  initial begin
    load_en = 0; load_idx = 0; load_data = '0; start = 0; rd_idx = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_one(0);
    run_one(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
