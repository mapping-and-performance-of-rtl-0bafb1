// tb_mg_fx_mult: self-checking test of the 16-bit multiplier.
// One random multiplication per cycle, signed and unsigned mixed, plus the
// corner operands 0x8000 and 0xFFFF. Each product must appear exactly 13
// cycles after its operands (and not one cycle earlier).
module tb_mg_fx_mult;
  localparam int LAT = 13;
  localparam int NOPS = 500;
  logic        clk = 0, rst_n = 0;
  logic [15:0] a, b;
  logic        is_signed;
  logic [31:0] p;
  logic [15:0] oa [NOPS], ob [NOPS];
  logic        os [NOPS];
  int checks = 0, failures = 0;

  mg_fx_mult dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_mul(input int n);
    longint sa, sb;
    if (os[n]) begin sa = longint'($signed(oa[n])); sb = longint'($signed(ob[n])); end
    else       begin sa = longint'(oa[n]);          sb = longint'(ob[n]); end
    return 32'(sa * sb);
  endfunction

  initial begin
    for (int n = 0; n < NOPS; n++) begin
      oa[n] = 16'($urandom); ob[n] = 16'($urandom); os[n] = 1'($urandom);
      if (n % 50 == 1) begin oa[n] = 16'h8000; ob[n] = 16'h8000; end
      if (n % 50 == 2) begin oa[n] = 16'hFFFF; ob[n] = 16'hFFFF; end
      if (n % 50 == 3) begin oa[n] = 16'h8000; ob[n] = 16'h7FFF; end
    end
    a = 0; b = 0; is_signed = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < NOPS + LAT; t++) begin
      if (t < NOPS) begin a = oa[t]; b = ob[t]; is_signed = os[t]; end
      @(posedge clk); #1;
      if (t - LAT + 1 >= 0 && t - LAT + 1 < NOPS) begin
        checks++;
        if (p != ref_mul(t - LAT + 1)) begin
          failures++;
          $display("FAIL op %0d got %h want %h", t - LAT + 1, p, ref_mul(t - LAT + 1));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
