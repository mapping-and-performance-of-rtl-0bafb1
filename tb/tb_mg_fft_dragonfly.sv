// tb_mg_fft_dragonfly: self-checking test of the radix-4 kernel.
// Random Q15 inputs (complex magnitude below 1) and random unit twiddles, one
// dragonfly per cycle. Each output set must arrive exactly 66 cycles after
// its inputs and match Y = (1/4) * B2 * B1 * [X0, W1 X1, W2 X2, W3 X3] from
// the matrix form, evaluated here in real arithmetic, within 2 LSBs (the
// hardware truncates after each multiplication and after the division by 4).
module tb_mg_fft_dragonfly;
  import mg_pkg::*;
  localparam int LAT = 66;
  localparam int NOPS = 200;
  localparam real PI = 3.14159265358979;
  logic    clk = 0, rst_n = 0;
  cplx16_t x [4];
  cplx16_t w [3];
  cplx16_t y [4];
  real     xr [NOPS][4], xi [NOPS][4], wr [NOPS][3], wi [NOPS][3];
  int checks = 0, failures = 0;

  mg_fft_dragonfly dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // B2 * B1 applied to v (v0 = X0, v1..3 = twiddled inputs)
  task automatic kernel(input real vr [4], input real vi [4], output real yr [4], output real yi [4]);
    real r0r, r0i, r1r, r1i, r2r, r2i, r3r, r3i;
    r0r = vr[0] + vr[2]; r0i = vi[0] + vi[2];
    r1r = vr[0] - vr[2]; r1i = vi[0] - vi[2];
    r2r = vr[1] + vr[3]; r2i = vi[1] + vi[3];
    r3r = vr[1] - vr[3]; r3i = vi[1] - vi[3];
    yr[0] = r0r + r2r;  yi[0] = r0i + r2i;
    yr[2] = r0r - r2r;  yi[2] = r0i - r2i;
    yr[1] = r1r + r3i;  yi[1] = r1i - r3r;     // r1 - j r3
    yr[3] = r1r - r3i;  yi[3] = r1i + r3r;     // r1 + j r3
  endtask

  initial begin
    for (int n = 0; n < NOPS; n++) begin
      for (int m = 0; m < 4; m++) begin
        real ang, mag;
        ang = 2.0 * PI * $urandom_range(0, 9999) / 10000.0;
        mag = 32000.0 * $urandom_range(0, 10000) / 10000.0;
        xr[n][m] = real'(int'(mag * $cos(ang)));
        xi[n][m] = real'(int'(mag * $sin(ang)));
      end
      for (int m = 0; m < 3; m++) begin
        int k;
        k = $urandom_range(0, 255);
        wr[n][m] = real'(int'(32767.0 * $cos(2.0 * PI * k / 256.0)));
        wi[n][m] = real'(int'(-32767.0 * $sin(2.0 * PI * k / 256.0)));
      end
    end
    for (int m = 0; m < 4; m++) x[m] = '0;
    for (int m = 0; m < 3; m++) w[m] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < NOPS + LAT; t++) begin
      if (t < NOPS) begin
        for (int m = 0; m < 4; m++) begin x[m].re = 16'(int'(xr[t][m])); x[m].im = 16'(int'(xi[t][m])); end
        for (int m = 0; m < 3; m++) begin w[m].re = 16'(int'(wr[t][m])); w[m].im = 16'(int'(wi[t][m])); end
      end
      @(posedge clk); #1;
      if (t - LAT + 1 >= 0 && t - LAT + 1 < NOPS) begin
        int n;
        real vr [4], vi [4], yr [4], yi [4];
        n = t - LAT + 1;
        vr[0] = xr[n][0]; vi[0] = xi[n][0];
        for (int m = 1; m < 4; m++) begin
          vr[m] = (xr[n][m] * wr[n][m-1] - xi[n][m] * wi[n][m-1]) / 32768.0;
          vi[m] = (xr[n][m] * wi[n][m-1] + xi[n][m] * wr[n][m-1]) / 32768.0;
        end
        kernel(vr, vi, yr, yi);
        for (int q = 0; q < 4; q++) begin
          real er, ei;
          er = real'(y[q].re) - yr[q] / 4.0;
          ei = real'(y[q].im) - yi[q] / 4.0;
          checks++;
          if (er > 2.0 || er < -2.0 || ei > 2.0 || ei < -2.0) begin
            failures++; $display("FAIL op %0d Y%0d got %0d %0d want %f %f", n, q, y[q].re, y[q].im, yr[q]/4.0, yi[q]/4.0);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
