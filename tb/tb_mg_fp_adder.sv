// tb_mg_fp_adder: self-checking test of the hybrid-format floating-point adder.
// Random operands (significands with two bits of headroom, exponents
// multiples of 4 spread so that alignments of 0..32 bits all occur, equal
// exponents included), one per cycle with random gaps. Each result must
// arrive exactly 57 cycles after its operands; its value sig/2^27 * 2^exp is
// compared with the sum computed in real arithmetic (allowed error: the one
// truncated LSB of the shifted operand), and its exponent must be the larger
// input exponent.
module tb_mg_fp_adder;
  localparam int LAT = 57;
  localparam int NOPS = 300;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic signed [27:0] xs, ys, zs;
  logic signed [9:0]  xe, ye, ze;
  logic signed [27:0] oxs [NOPS], oys [NOPS];
  logic signed [9:0]  oxe [NOPS], oye [NOPS];
  int   t_in [NOPS];
  int checks = 0, failures = 0, nin = 0, nout = 0, cyc = 0;
  int   n_shift_big = 0;

  mg_fp_adder dut (.*);

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
      oxs[n] = 28'($signed(26'($urandom)));
      oys[n] = 28'($signed(26'($urandom)));
      oxe[n] = 10'($signed(4 * $urandom_range(0, 20)) - 40);
      oye[n] = (n % 5 == 0) ? oxe[n] : 10'($signed(4 * $urandom_range(0, 20)) - 40);
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
            logic signed [9:0] emax;
            emax = (oxe[nout] > oye[nout]) ? oxe[nout] : oye[nout];
            want = val(oxs[nout], oxe[nout]) + val(oys[nout], oye[nout]);
            got  = val(zs, ze);
            tol  = 2.0 ** (emax - 27);
            checks += 3;
            if (cyc - t_in[nout] != LAT) begin failures++; $display("FAIL latency %0d", cyc - t_in[nout]); end
            if (ze != emax) begin failures++; $display("FAIL op %0d exponent", nout); end
            if (got - want > tol || want - got > tol) begin
              failures++; $display("FAIL op %0d value got %f want %f", nout, got, want);
            end
            if (oxe[nout] - oye[nout] >= 28 || oye[nout] - oxe[nout] >= 28) n_shift_big++;
            nout++;
          end
        end
      end
    join
    checks++;
    if (n_shift_big == 0) begin failures++; $display("FAIL no full-width alignment exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
