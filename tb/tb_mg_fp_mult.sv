// tb_mg_fp_mult: self-checking test of the hybrid-format floating-point
// multiplier. Random significands of random magnitude (so that the encoder
// has to realign by 0 to 6 digits), exponents multiples of 4, one operation
// per cycle with gaps. Each result must arrive exactly 74 cycles after its
// operands, keep a multiple-of-4 exponent, be as far realigned as possible
// (no further whole digit could be shifted out, unless the limit of 6 digits
// was used), and match the real-valued product within one LSB.
module tb_mg_fp_mult;
  localparam int LAT = 74;
  localparam int NOPS = 300;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic signed [27:0] xs, ys, zs;
  logic signed [9:0]  xe, ye, ze;
  logic signed [27:0] oxs [NOPS], oys [NOPS];
  logic signed [9:0]  oxe [NOPS], oye [NOPS];
  int   t_in [NOPS];
  int   shifts_seen [7];
  int checks = 0, failures = 0, nin = 0, nout = 0, cyc = 0;

  mg_fp_mult dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real val(input logic signed [27:0] s, input logic signed [9:0] e);
    return (real'(s) / 134217728.0) * (2.0 ** e);
  endfunction

  initial begin
    for (int n = 0; n < NOPS; n++) begin
      int sa, sb;
      logic signed [31:0] ra, rb;
      sa = 4 + $urandom_range(0, 13);
      sb = 4 + $urandom_range(0, 13);
      ra = $urandom; rb = $urandom;
      oxs[n] = 28'(ra >>> sa);
      oys[n] = 28'(rb >>> sb);
      if (oxs[n] == 0) oxs[n] = 1;
      if (oys[n] == 0) oys[n] = -1;
      oxe[n] = 10'($signed(4 * $urandom_range(0, 20)) - 40);
      oye[n] = 10'($signed(4 * $urandom_range(0, 20)) - 40);
    end
    in_valid = 0; xs = 0; ys = 0; xe = 0; ye = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      begin
        while (nin < NOPS) begin
          if ($urandom_range(0, 3) != 0) begin
            in_valid = 1; xs = oxs[nin]; ys = oys[nin]; xe = oxe[nin]; ye = oye[nin];
            t_in[nin] = cyc; nin++;
          end else in_valid = 0;
          @(posedge clk); #1;
        end
        in_valid = 0;
      end
      begin
        while (nout < NOPS) begin
          @(posedge clk); #1;
          if (out_valid) begin
            real want, got, tol;
            int  n, ez;
            logic [4:0] top;
            want = val(oxs[nout], oxe[nout]) * val(oys[nout], oye[nout]);
            got  = val(zs, ze);
            ez   = ze;
            tol  = 2.0 ** (ez - 27);
            n    = (int'(oxe[nout]) + int'(oye[nout]) - int'(ze)) / 4;
            top  = zs[27:23];
            checks += 4;
            if (cyc - t_in[nout] != LAT) begin failures++; $display("FAIL latency %0d", cyc - t_in[nout]); end
            if (ze[1:0] != 2'b00 || n < 0 || n > 6) begin failures++; $display("FAIL op %0d exponent %0d", nout, ze); end
            else shifts_seen[n]++;
            if (n < 6 && (top == 5'b00000 || top == 5'b11111)) begin
              failures++; $display("FAIL op %0d not realigned (n=%0d zs=%h)", nout, n, zs);
            end
            if (got - want > tol || want - got > tol) begin
              failures++; $display("FAIL op %0d value got %e want %e", nout, got, want);
            end
            nout++;
          end
        end
      end
    join
    for (int k = 0; k <= 6; k++) begin
      checks++;
      if (shifts_seen[k] == 0) begin failures++; $display("FAIL realignment by %0d digits never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
