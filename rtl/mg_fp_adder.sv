// mg_fp_adder: adder for the hybrid floating-point format.
//
// Numbers are (sig, exp): a 28-bit two's-complement significand read as a
// fraction in [-1,1), not normalized, and a 10-bit two's-complement exponent
// whose two LSBs are zero, value = sig/2^27 * 2^exp. Because exponents move
// in steps of 4, significands only ever shift by whole digits.
// Datapath (three registered steps, then the network latches):
//  1. COMP: the comparator forms the exponent difference xe - ye;
//  2. EXCH + shifter: the operand with the smaller exponent is routed to the
//     shifter and shifted right (arithmetic) by the difference, a multiple
//     of 4 bits; the multiplexer selects the larger exponent;
//  3. fixed-point adder: zs = larger + shifted smaller.
// The result is not realigned (normalised): the document leaves that to the
// end of a chain of floating-point operations. The sum wraps if it leaves
// [-1,1); callers keep headroom in the significand, as the denormalised
// format intends. Timing: one addition may start per cycle; zs/ze and
// out_valid appear LATENCY (57) cycles after in_valid.
// Following the document: format, structure, latency. This design's own
// choice: the wrap-around on overflow and the valid handshake.
module mg_fp_adder
  import mg_pkg::*;
#(
  parameter int unsigned SIG_W   = 28,
  parameter int unsigned EXP_W   = 10,
  parameter int unsigned LATENCY = 57
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
  // step 1: compare
  logic                    v1;
  logic signed [EXP_W:0]   diff1;
  logic signed [SIG_W-1:0] xs1, ys1;
  logic signed [EXP_W-1:0] xe1, ye1;
  // step 2: exchange and align
  logic                    v2;
  logic signed [SIG_W-1:0] big2, small2;
  logic signed [EXP_W-1:0] e2;
  // step 3: add
  logic                    v3;
  logic signed [SIG_W-1:0] s3;
  logic signed [EXP_W-1:0] e3;

  logic              x_big;
  logic [EXP_W:0]    mag;

  always_comb begin
    x_big = !diff1[EXP_W];
    mag   = x_big ? diff1 : -diff1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0;
      diff1 <= '0; xs1 <= '0; ys1 <= '0; xe1 <= '0; ye1 <= '0;
      big2 <= '0; small2 <= '0; e2 <= '0; s3 <= '0; e3 <= '0;
    end else begin
      v1    <= in_valid;
      diff1 <= (EXP_W+1)'(xe) - (EXP_W+1)'(ye);
      xs1   <= xs; ys1 <= ys; xe1 <= xe; ye1 <= ye;

      v2     <= v1;
      big2   <= x_big ? xs1 : ys1;
      // shift in whole digits; a distance of SIG_W or more leaves only sign
      small2 <= (mag >= (EXP_W+1)'(SIG_W)) ? ((x_big ? ys1 : xs1) >>> (SIG_W-1))
                               : ((x_big ? ys1 : xs1) >>> {mag[EXP_W:2], 2'b00});
      e2     <= x_big ? xe1 : ye1;

      v3 <= v2;
      s3 <= big2 + small2;
      e3 <= e2;
    end
  end

  mg_delay #(.W(1 + SIG_W + EXP_W), .DEPTH(LATENCY - 3)) u_pipe (
    .clk(clk), .rst_n(rst_n), .d({v3, s3, e3}), .q({out_valid, zs, ze})
  );

  // Rule of the format: exponents are multiples of 4.
  a_exp_format: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (xe[1:0] == 2'b00 && ye[1:0] == 2'b00));
endmodule
