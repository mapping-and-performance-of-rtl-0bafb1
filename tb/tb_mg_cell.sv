// tb_mg_cell: self-checking test of the 4-bit cell.
// Mathematics mode: random operands, y must equal a*b + c + d one cycle later,
// including the extreme 15*15 + 15 + 15 = 255. Memory mode: fill all 128
// words through the write port, read them back through the read port (one
// cycle latency), and check that a read of the word being written returns
// the old contents.
module tb_mg_cell;
  logic       clk = 0, rst_n = 0;
  logic       mode;
  logic [3:0] a, b, c, d, wi, ro;
  logic [7:0] y;
  logic       we;
  logic [6:0] wa, ra;
  int checks = 0, failures = 0;
  logic [3:0] model [128];

  mg_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    mode = 0; a = 0; b = 0; c = 0; d = 0; we = 0; wa = 0; wi = 0; ra = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // mathematics mode
    for (int i = 0; i < 300; i++) begin
      logic [3:0] ta, tb, tc, td;
      ta = (i == 0) ? 4'hF : 4'($urandom);
      tb = (i == 0) ? 4'hF : 4'($urandom);
      tc = (i == 0) ? 4'hF : 4'($urandom);
      td = (i == 0) ? 4'hF : 4'($urandom);
      a = ta; b = tb; c = tc; d = td;
      @(posedge clk); #1;
      check(y == 8'(ta) * 8'(tb) + 8'(tc) + 8'(td), $sformatf("math %0d*%0d+%0d+%0d got %0d", ta, tb, tc, td, y));
    end
    // memory mode: fill
    mode = 1;
    for (int i = 0; i < 128; i++) begin
      model[i] = 4'($urandom);
      we = 1; wa = 7'(i); wi = model[i];
      @(posedge clk); #1;
    end
    we = 0;
    // read back
    for (int i = 0; i < 128; i++) begin
      ra = 7'(127 - i);
      @(posedge clk); #1;
      check(ro == model[127 - i], $sformatf("mem[%0d] got %h want %h", 127 - i, ro, model[127 - i]));
    end
    // read during write of the same address returns old data, then new data
    ra = 7'd5; wa = 7'd5; wi = ~model[5]; we = 1;
    @(posedge clk); #1;
    we = 0;
    check(ro == model[5], "read-during-write old value");
    @(posedge clk); #1;
    check(ro == ~model[5], "value after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
