// tb_mg_fx_adder: self-checking test of the digit-serial 32-bit adder.
// A new random addition starts every cycle (full throughput). Digit k of the
// operation started in cycle n is driven in cycle n + 2k; the test checks
// that sum digit k is on s_dig[k] in cycle n + 2k + 1 and the carry out in
// cycle n + 15, against sums computed here with 33-bit integer arithmetic.
// Carries across every digit boundary are forced by a few all-ones operands.
module tb_mg_fx_adder;
  import mg_pkg::*;
  localparam int D = 8;
  localparam int NOPS = 400;
  logic   clk = 0, rst_n = 0;
  digit_t x_dig [D], y_dig [D], s_dig [D];
  logic   cin, cout;
  logic [31:0] ox [NOPS], oy [NOPS];
  logic        oc [NOPS];
  int checks = 0, failures = 0;

  mg_fx_adder #(.DIGITS(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NOPS; n++) begin
      ox[n] = $urandom; oy[n] = $urandom; oc[n] = 1'($urandom);
      if (n % 37 == 0) begin ox[n] = 32'hFFFF_FFFF; oy[n] = 32'd0; oc[n] = 1'b1; end
      if (n % 41 == 0) begin ox[n] = 32'h8888_8888; oy[n] = 32'h7777_7778; end
    end
    for (int k = 0; k < D; k++) begin x_dig[k] = 0; y_dig[k] = 0; end
    cin = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < NOPS + 2*D; t++) begin
      for (int k = 0; k < D; k++) begin
        int n;
        n = t - 2*k;
        x_dig[k] = (n >= 0 && n < NOPS) ? ox[n][4*k +: 4] : 4'd0;
        y_dig[k] = (n >= 0 && n < NOPS) ? oy[n][4*k +: 4] : 4'd0;
      end
      cin = (t < NOPS) ? oc[t] : 1'b0;
      @(posedge clk); #1;
      for (int k = 0; k < D; k++) begin
        int n;
        logic [32:0] sum;
        n = t - 2*k;
        if (n >= 0 && n < NOPS) begin
          sum = 33'(ox[n]) + 33'(oy[n]) + 33'(oc[n]);
          checks++;
          if (s_dig[k] != sum[4*k +: 4]) begin
            failures++;
            $display("FAIL op %0d digit %0d got %h want %h", n, k, s_dig[k], sum[4*k +: 4]);
          end
          if (k == D-1) begin
            checks++;
            if (cout != sum[32]) begin failures++; $display("FAIL op %0d cout", n); end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
