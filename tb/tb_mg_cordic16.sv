// tb_mg_cordic16: self-checking test of the 16-stage CORDIC unit.
// 256 random vectors with x > 0 (plus the axis cases y = 0 and x = 0), one per
// cycle. Each result must arrive exactly 313 cycles after its input; the
// magnitude must equal 64 * K * sqrt(x^2 + y^2) (K = 1.64676) within 0.1 %
// plus a few LSBs, and the angle atan2(y, x) * 2^23 / pi within 0.01 rad
// worth of units (16 iterations leave about 3e-5 rad of error).
module tb_mg_cordic16;
  localparam int LAT = 313;
  localparam int NOPS = 256;
  localparam real K = 1.6467602578654548;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic signed [15:0] x_in, y_in;
  logic signed [23:0] mag, angle;
  logic signed [15:0] ox [NOPS], oy [NOPS];
  int   t_in [NOPS];
  int checks = 0, failures = 0, nout = 0, cyc = 0;

  mg_cordic16 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NOPS; n++) begin
      ox[n] = 16'($urandom_range(1, 32767));
      oy[n] = 16'($signed(16'($urandom)));
    end
    oy[0] = 0; ox[1] = 0; oy[1] = 20000; ox[2] = 0; oy[2] = -20000;
    in_valid = 0; x_in = 0; y_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      for (int n = 0; n < NOPS; n++) begin
        in_valid = 1; x_in = ox[n]; y_in = oy[n]; t_in[n] = cyc;
        @(posedge clk); #1;
      end
      while (nout < NOPS) begin
        @(posedge clk); #1;
        if (out_valid) begin
          real wm, wa, gm, ga;
          wm = 64.0 * K * $sqrt(real'(ox[nout]) ** 2 + real'(oy[nout]) ** 2);
          wa = $atan2(real'(oy[nout]), real'(ox[nout])) * 8388608.0 / PI;
          gm = real'(mag); ga = real'(angle);
          checks += 3;
          if (cyc - t_in[nout] != LAT) begin failures++; $display("FAIL latency %0d", cyc - t_in[nout]); end
          if (gm - wm > wm * 0.001 + 64.0 || wm - gm > wm * 0.001 + 64.0) begin
            failures++; $display("FAIL mag %0d: got %f want %f", nout, gm, wm);
          end
          if (ga - wa > 26700.0 || wa - ga > 26700.0) begin
            failures++; $display("FAIL angle %0d: got %f want %f", nout, ga, wa);
          end
          nout++;
        end
      end
    join_any
    wait (nout == NOPS);
    in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
