// tb_mg_dsp_top: end-to-end test of the whole device at its default size
// (32 x 32 cell array). All blocks run at the same time:
//  * cell array: a three-cell pipeline fed from the west edge (edge input,
//    mesh hops) and a tree route across the whole array from cell (0,0)
//    to cell (31,31), which must take 10 cycles (the two cells meet at the
//    root of the 10-level H-tree);
//  * digit-serial adder: operations whose carry ripples through all digits;
//  * multiplier (signed and unsigned) and shifter;
//  * floating-point adder (operand exchange and alignment) and multiplier
//    (realignment by the encoder);
//  * FIR filter: a 256-sample stream, 316 cycles from first input to last
//    output, outputs checked against the direct-form sum;
//  * CORDIC: a vector converted to magnitude and angle, 313-cycle latency;
//  * FFT: a single tone transformed in 524 cycles, energy in one bin.
// Each mechanism is counted; one that never happens is a failure.
module tb_mg_dsp_top;
  import mg_pkg::*;
  localparam int FN = 32;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cyc = 0;

  src_e       fab_cfg_src     [FN][FN][4];
  digit_t     fab_cfg_const   [FN][FN];
  out_e       fab_cfg_out     [FN][FN][8];
  logic       fab_cfg_glb_hi  [FN][FN];
  logic [9:0] fab_cfg_glb_src [FN][FN];
  logic       fab_cfg_glb_en  [FN][FN];
  digit_t     fab_ext_in [FN], fab_ext_out [FN];
  logic [7:0] fab_cell_y [FN][FN];
  digit_t     add_x_dig [8], add_y_dig [8], add_s_dig [8];
  logic       add_cin, add_cout;
  logic [15:0] mul_a, mul_b, sh_d, sh_q;
  logic        mul_signed;
  logic [31:0] mul_p;
  logic [3:0]  sh_amt;
  logic        fpa_in_valid, fpa_out_valid, fpm_in_valid, fpm_out_valid;
  hfp_t        fpa_x, fpa_y, fpa_z, fpm_x, fpm_y, fpm_z;
  logic        fir_x_valid, fir_y_valid;
  logic signed [15:0] fir_x, fir_coef [12];
  logic signed [19:0] fir_y;
  logic        cor_in_valid, cor_out_valid;
  logic signed [15:0] cor_x, cor_y;
  logic signed [23:0] cor_mag, cor_angle;
  logic        fft_load_en, fft_start, fft_busy, fft_done;
  logic [7:0]  fft_load_idx, fft_rd_idx;
  cplx16_t     fft_load_data, fft_rd_data;

  // mechanism counters
  int n_mesh_hop = 0, n_tree_root = 0, n_carry_ripple = 0, n_signed_mul = 0;
  int n_shift = 0, n_fp_align = 0, n_fp_realign = 0, n_fir_stream = 0;
  int n_cordic = 0, n_fft = 0;

  mg_dsp_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------------- fabric
  digit_t ext_hist [$];
  task automatic fabric_test();
    for (int t = 0; t < 200; t++) begin
      fab_ext_in[0] = 4'($urandom);
      ext_hist.push_front(fab_ext_in[0]);
      @(posedge clk); #1;
      if (t > 20) begin
        logic [7:0] y01_then;
        // (0,0) = ext captured at the last edge; (0,1) = 3 * (0,0) after one mesh hop;
        // (0,2) = 3 * low digit of (0,1) + 3 after a second hop
        y01_then = 8'(ext_hist[2]) * 8'd3;
        check(fab_cell_y[0][0] == 8'(ext_hist[0]), "fabric cell (0,0)");
        check(fab_cell_y[0][1] == y01_then, "fabric mesh hop");
        check(fab_cell_y[0][2] == 8'(4'(8'(ext_hist[4]) * 8'd3)) * 8'd3 + 8'd3, "fabric second hop");
        n_mesh_hop++;
        // (31,31) = (0,0) after 10 tree cycles and 1 cell cycle
        check(fab_cell_y[FN-1][FN-1] == 8'(ext_hist[11]), "fabric tree route 10 cycles");
        n_tree_root++;
      end
    end
  endtask

  // ----------------------------------------------------------------- adder
  task automatic adder_test();
    logic [31:0] xs [3], ys [3];
    xs = '{32'hFFFF_FFFF, 32'h0123_4567, 32'h8000_0000};
    ys = '{32'h0000_0001, 32'hFEDC_BA99, 32'h8000_0000};
    for (int op = 0; op < 3; op++) begin
      logic [32:0] sum;
      sum = 33'(xs[op]) + 33'(ys[op]);
      for (int t = 0; t < 16; t++) begin
        for (int k = 0; k < 8; k++) begin
          add_x_dig[k] = (t == 2*k) ? xs[op][4*k +: 4] : 4'd0;
          add_y_dig[k] = (t == 2*k) ? ys[op][4*k +: 4] : 4'd0;
        end
        add_cin = 0;
        @(posedge clk); #1;
        for (int k = 0; k < 8; k++)
          if (t == 2*k) check(add_s_dig[k] == sum[4*k +: 4], "adder digit");
        if (t == 14) check(add_cout == sum[32], "adder carry out");
      end
      if (op < 2) n_carry_ripple++;
    end
  endtask

  // ------------------------------------------------- multiplier and shifter
  task automatic mul_shift_test();
    mul_a = 16'hFFFD; mul_b = 16'd5; mul_signed = 1;     // -3 * 5
    sh_d = 16'h00B7; sh_amt = 4'd13;
    @(posedge clk); #1;
    mul_signed = 0;                                      // 65533 * 5
    repeat (12) @(posedge clk); #1;
    check(mul_p == 32'hFFFF_FFF1, "signed product");
    n_signed_mul++;
    @(posedge clk); #1;
    check(mul_p == 32'd327665, "unsigned product");
    check(sh_q == 16'hE000, "shift by 13");
    n_shift++;
  endtask

  // --------------------------------------------------------- floating point
  task automatic fp_test();
    // 0.5 * 2^8 + 0.5 * 2^0: y is aligned by 8 bits -> (0.5 + 2^-9) * 2^8
    fpa_x.sig = 28'sh400_0000; fpa_x.exp = 10'sd8;
    fpa_y.sig = 28'sh400_0000; fpa_y.exp = 10'sd0;
    // 2^-10 * 2^-10 = 2^-20: the product has to be realigned
    fpm_x.sig = 28'sh002_0000; fpm_x.exp = 10'sd0;
    fpm_y.sig = 28'sh002_0000; fpm_y.exp = 10'sd0;
    fpa_in_valid = 1; fpm_in_valid = 1;
    @(posedge clk); #1;
    fpa_in_valid = 0; fpm_in_valid = 0;
    repeat (56) @(posedge clk); #1;
    check(fpa_out_valid, "fp adder latency 57");
    check(fpa_z.exp == 10'sd8 && fpa_z.sig == 28'sh404_0000, "fp adder result");
    n_fp_align++;
    repeat (17) @(posedge clk); #1;
    check(fpm_out_valid, "fp multiplier latency 74");
    // product fraction 2^-20 realigned by 4 digits: sig 2^-4 (0x0800000), exp -16
    check(fpm_z.exp == -10'sd16 && fpm_z.sig == 28'sh080_0000, "fp multiplier realignment");
    n_fp_realign++;
  endtask

  // -------------------------------------------------------------------- FIR
  logic signed [15:0] fx [256];
  task automatic fir_test();
    int t0, nout, tlast;
    for (int i = 0; i < 12; i++) fir_coef[i] = 16'(i * 1000 - 5000);
    for (int n = 0; n < 256; n++) fx[n] = 16'($urandom);
    nout = 0; tlast = 0; t0 = cyc;
    fork
      begin
        for (int n = 0; n < 256; n++) begin
          fir_x_valid = 1; fir_x = fx[n];
          @(posedge clk); #1;
        end
        fir_x_valid = 0;
      end
      while (nout < 256) begin
        @(posedge clk); #1;
        if (fir_y_valid) begin
          logic signed [19:0] acc;
          acc = 0;
          for (int i = 0; i < 12; i++)
            if (nout - i >= 0) acc = acc + 20'((longint'(fx[nout - i]) * longint'(fir_coef[i])) >>> 11);
          check(fir_y == acc, "fir output");
          nout++;
          tlast = cyc;
        end
      end
    join
    check(tlast - t0 == 316, $sformatf("fir stream %0d cycles", tlast - t0));
    n_fir_stream++;
  endtask

  // ----------------------------------------------------------------- CORDIC
  task automatic cordic_test();
    int t0;
    cor_x = 16'sd12000; cor_y = 16'sd12000; cor_in_valid = 1; t0 = cyc;
    @(posedge clk); #1;
    cor_in_valid = 0;
    while (!cor_out_valid) begin @(posedge clk); #1; end
    check(cyc - t0 == 313, $sformatf("cordic latency %0d", cyc - t0));
    // 45 degrees = 2^21 units; magnitude 64 * K * 12000 * sqrt(2) = 1788626
    check(cor_angle > 24'sd2096752 && cor_angle < 24'sd2097552, "cordic angle");
    check(cor_mag > 24'sd1786000 && cor_mag < 24'sd1791000, $sformatf("cordic magnitude %0d", cor_mag));
    n_cordic++;
  endtask

  // -------------------------------------------------------------------- FFT
  task automatic fft_test();
    int t0;
    for (int n = 0; n < 256; n++) begin
      fft_load_en = 1; fft_load_idx = 8'(n);
      fft_load_data.re = 16'(int'(16000.0 * $cos(2.0 * PI * 5 * n / 256.0)));
      fft_load_data.im = 16'(int'(16000.0 * $sin(2.0 * PI * 5 * n / 256.0)));
      @(posedge clk); #1;
    end
    fft_load_en = 0; fft_start = 1; t0 = cyc;
    @(posedge clk); #1;
    fft_start = 0;
    while (!fft_done) begin @(posedge clk); #1; end
    check(cyc - t0 == 524, $sformatf("fft time %0d", cyc - t0));
    @(posedge clk); #1;
    for (int k = 0; k < 256; k++) begin
      fft_rd_idx = 8'(k);
      @(posedge clk); #1;
      if (k == 5) check(fft_rd_data.re > 15990 && fft_rd_data.re < 16010 &&
                        fft_rd_data.im > -10 && fft_rd_data.im < 10, "fft peak bin");
      else        check(fft_rd_data.re > -6 && fft_rd_data.re < 6 &&
                        fft_rd_data.im > -6 && fft_rd_data.im < 6, $sformatf("fft bin %0d", k));
    end
    n_fft++;
  endtask

  initial begin
    for (int r = 0; r < FN; r++) begin
      fab_ext_in[r] = 0;
      for (int c = 0; c < FN; c++) begin
        for (int k = 0; k < 4; k++) fab_cfg_src[r][c][k] = SRC_ZERO;
        for (int k = 0; k < 8; k++) fab_cfg_out[r][c][k] = OUT_OFF;
        fab_cfg_const[r][c] = 0; fab_cfg_glb_hi[r][c] = 0;
        fab_cfg_glb_src[r][c] = 0; fab_cfg_glb_en[r][c] = 0;
      end
    end
    // (0,0): y = ext_in * 1; (0,1): y = west * 3; (0,2): y = west * 3 + 3
    fab_cfg_src[0][0] = '{SRC_W, SRC_CONST, SRC_ZERO, SRC_ZERO}; fab_cfg_const[0][0] = 4'd1;
    fab_cfg_out[0][0][DIR_E] = OUT_LO;
    fab_cfg_src[0][1] = '{SRC_W, SRC_CONST, SRC_ZERO, SRC_ZERO}; fab_cfg_const[0][1] = 4'd3;
    fab_cfg_out[0][1][DIR_E] = OUT_LO;
    fab_cfg_src[0][2] = '{SRC_W, SRC_CONST, SRC_CONST, SRC_ZERO}; fab_cfg_const[0][2] = 4'd3;
    // (31,31): y = global digit from cell (0,0) (leaf 0) * 1
    fab_cfg_src[FN-1][FN-1] = '{SRC_GLB, SRC_CONST, SRC_ZERO, SRC_ZERO}; fab_cfg_const[FN-1][FN-1] = 4'd1;
    fab_cfg_glb_src[FN-1][FN-1] = 10'd0; fab_cfg_glb_en[FN-1][FN-1] = 1'b1;
    for (int k = 0; k < 8; k++) begin add_x_dig[k] = 0; add_y_dig[k] = 0; end
    add_cin = 0; mul_a = 0; mul_b = 0; mul_signed = 0; sh_d = 0; sh_amt = 0;
    fpa_in_valid = 0; fpa_x = '0; fpa_y = '0; fpm_in_valid = 0; fpm_x = '0; fpm_y = '0;
    fir_x_valid = 0; fir_x = 0; for (int i = 0; i < 12; i++) fir_coef[i] = 0;
    cor_in_valid = 0; cor_x = 0; cor_y = 0;
    fft_load_en = 0; fft_load_idx = 0; fft_load_data = '0; fft_start = 0; fft_rd_idx = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      fabric_test();
      begin adder_test(); mul_shift_test(); fp_test(); end
      fir_test();
      cordic_test();
      fft_test();
    join
    check(n_mesh_hop > 0, "mesh hop happened");
    check(n_tree_root > 0, "root-level tree route happened");
    check(n_carry_ripple > 0, "carry ripple happened");
    check(n_signed_mul > 0, "signed multiplication happened");
    check(n_shift > 0, "shift happened");
    check(n_fp_align > 0, "fp alignment happened");
    check(n_fp_realign > 0, "fp realignment happened");
    check(n_fir_stream > 0, "fir stream happened");
    check(n_cordic > 0, "cordic conversion happened");
    check(n_fft > 0, "fft transform happened");
    $display("mechanisms: mesh %0d tree %0d carry %0d smul %0d shift %0d fpalign %0d fprealign %0d fir %0d cordic %0d fft %0d",
             n_mesh_hop, n_tree_root, n_carry_ripple, n_signed_mul, n_shift, n_fp_align, n_fp_realign,
             n_fir_stream, n_cordic, n_fft);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
