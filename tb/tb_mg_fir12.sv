// tb_mg_fir12: self-checking test of the 12-tap FIR filter.
// Random Q15 coefficients (including -1.0) and random 16-bit samples. First a
// continuous 256-sample stream, which must finish in 61 + 255 = 316 cycles
// from the first input to the last output; then a second stream with random
// gaps in x_valid. Every output is compared with the direct-form sum
// y[n] = sum_i ((x[n-i] * b_i) >>> 11) in 20-bit arithmetic, and must appear
// exactly 61 cycles after its sample.
module tb_mg_fir12;
  localparam int LAT = 61;
  localparam int NS = 256;
  localparam int TAPS = 12;
  logic clk = 0, rst_n = 0;
  logic x_valid, y_valid;
  logic signed [15:0] x;
  logic signed [15:0] coef [TAPS];
  logic signed [19:0] y;
  logic signed [15:0] xs [2*NS];
  int   t_in [2*NS];
  int checks = 0, failures = 0, nin = 0, nout = 0, cyc = 0, t_last = 0;

  mg_fir12 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [19:0] ref_y(input int n);
    logic signed [19:0] acc;
    acc = 0;
    for (int i = 0; i < TAPS; i++) begin
      int m;
      longint p;
      m = n - i;
      // the two streams are one sequence of valid samples
      if (m >= 0) begin
        p = longint'(xs[m]) * longint'(coef[i]);
        acc = acc + 20'(p >>> 11);
      end
    end
    return acc;
  endfunction

  initial begin
    for (int i = 0; i < TAPS; i++) coef[i] = 16'($urandom);
    coef[3] = 16'sh8000;
    for (int n = 0; n < 2*NS; n++) xs[n] = 16'($urandom);
    x_valid = 0; x = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      begin
        while (nin < 2*NS) begin
          if (nin < NS || $urandom_range(0, 2) != 0) begin
            x_valid = 1; x = xs[nin]; t_in[nin] = cyc; nin++;
          end else x_valid = 0;
          @(posedge clk); #1;
        end
        x_valid = 0;
      end
      begin
        while (nout < 2*NS) begin
          @(posedge clk); #1;
          if (y_valid) begin
            checks += 2;
            if (cyc - t_in[nout] != LAT) begin failures++; $display("FAIL latency %0d", cyc - t_in[nout]); end
            if (y != ref_y(nout)) begin
              failures++; $display("FAIL y[%0d] got %0d want %0d", nout, y, ref_y(nout));
            end
            if (nout == NS - 1) t_last = cyc;
            nout++;
          end
        end
      end
    join
    // cycles from the first input to the last output of the first stream:
    // latency plus one cycle per further sample, 316 in all
    checks++;
    if (t_last - t_in[0] != 316) begin
      failures++; $display("FAIL stream time %0d", t_last - t_in[0]);
    end
    $display("256-sample stream: %0d cycles", t_last - t_in[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
