// mg_fp_mult: multiplier for the hybrid floating-point format.
//
// Same format as mg_fp_adder: value = sig/2^27 * 2^exp, 28-bit significand,
// 10-bit exponent with two zero LSBs. Datapath:
//  1. a fixed-point multiplier forms the 56-bit significand product P and an
//     adder forms xe + ye (registered);
//  2. the encoder, fed straight from the multiplier, finds n, the number of
//     whole leading digits that only repeat the sign (0..6), so the product
//     can be realigned without losing its value (registered);
//  3. the shifter moves P left by 4n bits and keeps bits [54:27] as the new
//     significand; the subtractor gives ze = xe + ye - 4n (registered).
// Exponent LSBs stay zero because the realignment moves whole digits.
// The product of -1 and -1 (both significands at their most negative value)
// is the one case that does not fit and wraps. Exponents wrap on overflow.
// Timing: one multiplication may start per cycle; the result and out_valid
// appear LATENCY (74) cycles after in_valid.
// Following the document: format, the multiply / add / encode / shift /
// subtract structure, latency. This design's own choice: the fraction
// reading of the significand, which fixes which product bits are kept.
module mg_fp_mult
  import mg_pkg::*;
#(
  parameter int unsigned SIG_W   = 28,
  parameter int unsigned EXP_W   = 10,
  parameter int unsigned LATENCY = 74
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [SIG_W-1:0] xs,
  input  logic signed [EXP_W-1:0] xe,
  input  logic signed [SIG_W-1:0] ys,
  input  logic signed [EXP_W-1:0] ye,
  output logic                    out_valid,
  output logic signed [SIG_W-1:0] zs,
  output logic signed [EXP_W-1:0] ze
);
  localparam int unsigned PW   = 2 * SIG_W;
  localparam int unsigned MAXN = (SIG_W - 4) / 4;   // 6 digits for 28 bits

  logic                    v1, v2, v3;
  logic signed [PW-1:0]    p1, p2;
  logic signed [EXP_W-1:0] e1, e2, e3;
  logic [2:0]              n2;
  logic signed [SIG_W-1:0] s3;
  logic [2:0]              n_enc;
  logic [PW-1:0]           p_shift;

  // Encoder: largest n such that P[PW-1 : PW-2-4n] all equal the sign bit.
  always_comb begin
    n_enc = '0;
    for (int n = 1; n <= MAXN; n++) begin
      logic ok;
      ok = 1'b1;
      for (int b = PW - 2 - 4*n; b < PW - 1; b++)
        if (p1[b] != p1[PW-1]) ok = 1'b0;
      if (ok) n_enc = 3'(n);
    end
  end

  assign p_shift = p2 << {n2, 2'b00};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      p1 <= '0; p2 <= '0; e1 <= '0; e2 <= '0; e3 <= '0; n2 <= '0; s3 <= '0;
    end else begin
      v1 <= in_valid;
      p1 <= PW'(xs) * PW'(ys);
      e1 <= xe + ye;

      v2 <= v1;
      p2 <= p1;
      n2 <= n_enc;
      e2 <= e1;

      v3 <= v2;
      s3 <= p_shift[PW-2 -: SIG_W];
      e3 <= e2 - EXP_W'({n2, 2'b00});
    end
  end

  mg_delay #(.W(1 + SIG_W + EXP_W), .DEPTH(LATENCY - 3)) u_pipe (
    .clk(clk), .rst_n(rst_n), .d({v3, s3, e3}), .q({out_valid, zs, ze})
  );

  a_exp_format: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (xe[1:0] == 2'b00 && ye[1:0] == 2'b00));
endmodule
