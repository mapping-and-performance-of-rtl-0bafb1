// tb_mg_fft_mem: self-checking test of the FFT memory unit.
// Phase 1 fills bank 0 through the four write ports (each port its own row,
// all four writing in the same cycle) while the read ports read bank 1.
// Phase 2 fills bank 1 with different data. Phase 3 reads random addresses
// on all four read ports at once from each bank, one cycle latency, and
// compares with a model of the 256 words per bank; every column must see
// every row.
module tb_mg_fft_mem;
  logic        clk = 0, rst_n = 0;
  logic        rd_bank, wr_bank;
  logic [7:0]  rd_addr [4];
  logic [31:0] rd_data [4];
  logic        wr_en [4];
  logic [5:0]  wr_entry [4];
  logic [31:0] wr_data [4];
  logic [31:0] model [2][256];
  int checks = 0, failures = 0;

  mg_fft_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_bank = 0; wr_bank = 0;
    for (int p = 0; p < 4; p++) begin rd_addr[p] = 0; wr_en[p] = 0; wr_entry[p] = 0; wr_data[p] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < 2; b++) begin
      wr_bank = b[0]; rd_bank = ~b[0];
      for (int e = 0; e < 64; e++) begin
        for (int r = 0; r < 4; r++) begin
          wr_en[r] = 1; wr_entry[r] = 6'(63 - e); wr_data[r] = $urandom;
          model[b][r*64 + 63 - e] = wr_data[r];
        end
        @(posedge clk); #1;
      end
      for (int r = 0; r < 4; r++) wr_en[r] = 0;
    end
    for (int it = 0; it < 600; it++) begin
      logic [7:0] a [4];
      logic       bk;
      bk = 1'(it);
      rd_bank = bk;
      for (int c = 0; c < 4; c++) begin a[c] = 8'($urandom); rd_addr[c] = a[c]; end
      @(posedge clk); #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (rd_data[c] != model[bk][a[c]]) begin
          failures++; $display("FAIL bank %0d col %0d addr %0d", bk, c, a[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
