// mg_fft_dragonfly: radix-4 FFT kernel ("dragonfly").
//
//   [Y0]   [1 0  1  0] [1  0  1  0] [X0   ]
//   [Y1] = [0 1  0 -j] [1  0 -1  0] [W1 X1]
//   [Y2]   [1 0 -1  0] [0  1  0  1] [W2 X2]
//   [Y3]   [0 1  0  j] [0  1  0 -1] [W3 X3]
//
// Three complex multipliers apply the twiddle factors (each is four 16-bit
// fixed-point multipliers, products rescaled by 2^-15 into 24-bit words);
// then two layers of 24-bit adders/subtractors form X0 +/- W2X2 and
// W1X1 +/- W3X3, and from those Y0, Y2 = sum/difference and
// Y1, Y3 = difference -/+ j * difference. Finally the outputs are divided
// by 4 (arithmetic shift, rounding toward minus infinity) and cut back to
// 16-bit parts, so a 256-point transform through four stages yields DFT/256
// and cannot overflow while every input sample has magnitude below 1.
// Samples and twiddles are Q15 (mg_pkg::cplx16_t).
// Timing: fully pipelined, one dragonfly per cycle; y belongs to the x and w
// presented LATENCY cycles earlier (66, so that with the memory read and
// write the kernel spans 68 cycles between the two memories).
// Following the document: Eq. (3), 16-bit samples, 24-bit adders, latency
// between memories. This design's own choice: the 1/4 scaling per stage and
// the rounding.
module mg_fft_dragonfly
  import mg_pkg::*;
#(
  parameter int unsigned LATENCY = 66
) (
  input  logic    clk,
  input  logic    rst_n,
  input  cplx16_t x [4],
  input  cplx16_t w [3],     // W1, W2, W3
  output cplx16_t y [4]
);
  localparam int unsigned MULT_LAT = 13;
  localparam int unsigned OWN_LAT  = MULT_LAT + 3;

  typedef struct packed {
    logic signed [23:0] re;
    logic signed [23:0] im;
  } cplx24_t;

  // --- twiddle multiplication -------------------------------------------
  logic [31:0] prr [3], pii [3], pri [3], pir [3];
  for (genvar m = 0; m < 3; m++) begin : g_cmul
    mg_fx_mult #(.W(16), .LATENCY(MULT_LAT)) u_rr (.clk, .rst_n, .a(x[m+1].re), .b(w[m].re), .is_signed(1'b1), .p(prr[m]));
    mg_fx_mult #(.W(16), .LATENCY(MULT_LAT)) u_ii (.clk, .rst_n, .a(x[m+1].im), .b(w[m].im), .is_signed(1'b1), .p(pii[m]));
    mg_fx_mult #(.W(16), .LATENCY(MULT_LAT)) u_ri (.clk, .rst_n, .a(x[m+1].re), .b(w[m].im), .is_signed(1'b1), .p(pri[m]));
    mg_fx_mult #(.W(16), .LATENCY(MULT_LAT)) u_ir (.clk, .rst_n, .a(x[m+1].im), .b(w[m].re), .is_signed(1'b1), .p(pir[m]));
  end

  cplx16_t x0_d;
  mg_delay #(.W(32), .DEPTH(MULT_LAT)) u_x0 (.clk, .rst_n, .d(x[0]), .q(x0_d));

  function automatic logic signed [23:0] rescale(input logic [31:0] a, input logic [31:0] b,
                                                 input logic sub);
    logic signed [32:0] s;
    s = sub ? (33'($signed(a)) - 33'($signed(b))) : (33'($signed(a)) + 33'($signed(b)));
    return 24'(s >>> 15);
  endfunction

  cplx24_t b [4];      // X0, W1X1, W2X2, W3X3 in 24 bits
  cplx24_t r [4];      // first adder layer
  cplx24_t q [4];      // second adder layer, order Y0..Y3

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin b[i] <= '0; r[i] <= '0; q[i] <= '0; end
    end else begin
      b[0].re <= 24'(x0_d.re);
      b[0].im <= 24'(x0_d.im);
      for (int m = 0; m < 3; m++) begin
        b[m+1].re <= rescale(prr[m], pii[m], 1'b1);
        b[m+1].im <= rescale(pri[m], pir[m], 1'b0);
      end
      // layer 1
      r[0].re <= b[0].re + b[2].re;  r[0].im <= b[0].im + b[2].im;
      r[1].re <= b[0].re - b[2].re;  r[1].im <= b[0].im - b[2].im;
      r[2].re <= b[1].re + b[3].re;  r[2].im <= b[1].im + b[3].im;
      r[3].re <= b[1].re - b[3].re;  r[3].im <= b[1].im - b[3].im;
      // layer 2
      q[0].re <= r[0].re + r[2].re;  q[0].im <= r[0].im + r[2].im;
      q[2].re <= r[0].re - r[2].re;  q[2].im <= r[0].im - r[2].im;
      q[1].re <= r[1].re + r[3].im;  q[1].im <= r[1].im - r[3].re;   // r1 - j r3
      q[3].re <= r[1].re - r[3].im;  q[3].im <= r[1].im + r[3].re;   // r1 + j r3
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_out
    cplx16_t scaled;
    assign scaled.re = 16'(q[i].re >>> 2);
    assign scaled.im = 16'(q[i].im >>> 2);
    mg_delay #(.W(32), .DEPTH(LATENCY - OWN_LAT)) u_pad (.clk, .rst_n, .d(scaled), .q(y[i]));
  end
endmodule
