// tb_mg_log_shifter: self-checking test of the 16-bit logarithmic shifter.
// Every shift amount 0..15 with random data, one shift per cycle; the result
// must equal d << sh exactly 14 cycles after the inputs.
module tb_mg_log_shifter;
  localparam int LAT = 14;
  localparam int NOPS = 400;
  logic        clk = 0, rst_n = 0;
  logic [15:0] d, q;
  logic [3:0]  sh;
  logic [15:0] od [NOPS];
  logic [3:0]  osh [NOPS];
  int checks = 0, failures = 0;

  mg_log_shifter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NOPS; n++) begin od[n] = 16'($urandom); osh[n] = 4'(n); end
    d = 0; sh = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < NOPS + LAT; t++) begin
      if (t < NOPS) begin d = od[t]; sh = osh[t]; end
      @(posedge clk); #1;
      if (t - LAT + 1 >= 0 && t - LAT + 1 < NOPS) begin
        int n;
        n = t - LAT + 1;
        checks++;
        if (q != 16'(od[n] << osh[n])) begin
          failures++; $display("FAIL op %0d sh %0d got %h want %h", n, osh[n], q, 16'(od[n] << osh[n]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
