// tb_mg_htree: self-checking test of the global H-tree network.
// A 16-leaf tree (LEVELS = 4, the tree drawn in the document's figure) with
// every leaf driving a fresh random digit each cycle. Random routes are
// configured; each destination must receive its source's digit after exactly
// L cycles, L being the level where the two leaves meet. The route between
// leaves 6 and 9 (opposite halves of the tree) must take 4 cycles.
module tb_mg_htree;
  import mg_pkg::*;
  localparam int LEVELS = 4;
  localparam int N = 2**LEVELS;
  logic       clk = 0, rst_n = 0;
  digit_t     leaf_in  [N];
  logic [LEVELS-1:0] cfg_src [N];
  logic       cfg_en [N];
  digit_t     leaf_out [N];
  digit_t     hist [$];   // flattened history of leaf_in, newest first
  int checks = 0, failures = 0;
  int lat_hist [LEVELS+1];

  mg_htree #(.LEVELS(LEVELS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int meet(input int s, input int d);
    int l = 1;
    for (int k = 0; k < LEVELS; k++) if (((s ^ d) >> k) & 1) l = k + 1;
    return l;
  endfunction

  digit_t past [0:LEVELS][N];   // past[k][i] = leaf_in[i] k+1 cycles ago (at check time)

  initial begin
    for (int i = 0; i < N; i++) begin leaf_in[i] = 0; cfg_src[i] = 0; cfg_en[i] = 0; end
    for (int k = 0; k <= LEVELS; k++) for (int i = 0; i < N; i++) past[k][i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int phase = 0; phase < 20; phase++) begin
      for (int i = 0; i < N; i++) begin
        cfg_src[i] = LEVELS'($urandom);
        cfg_en[i]  = ($urandom_range(0, 7) != 0);
      end
      if (phase == 0) begin cfg_src[9] = 6; cfg_en[9] = 1; end
      // let the history refill under the new configuration
      for (int cyc = 0; cyc < 30; cyc++) begin
        for (int i = 0; i < N; i++) leaf_in[i] = 4'($urandom);
        #1;
        if (cyc > LEVELS) begin
          for (int i = 0; i < N; i++) begin
            digit_t want;
            int l;
            l = meet(int'(cfg_src[i]), i);
            want = cfg_en[i] ? past[l-1][cfg_src[i]] : 4'd0;
            checks++;
            if (leaf_out[i] !== want) begin
              failures++; if (failures < 5) $display("FAIL dst %0d src %0d lat %0d got %h want %h p1 %h p2 %h p3 %h p4 %h", i, cfg_src[i], l, leaf_out[i], want, past[1][cfg_src[i]], past[2][cfg_src[i]], past[3][cfg_src[i]], past[4][cfg_src[i]]);
            end
            if (cfg_en[i]) lat_hist[l]++;
          end
        end
        @(posedge clk); #1;
        for (int k = LEVELS; k > 0; k--) past[k] = past[k-1];
        past[0] = leaf_in;
      end
    end
    checks++;
    if (meet(6, 9) != 4) begin failures++; $display("FAIL A-B latency"); end
    for (int l = 1; l <= LEVELS; l++) begin
      checks++;
      if (lat_hist[l] == 0) begin failures++; $display("FAIL no route of latency %0d", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
