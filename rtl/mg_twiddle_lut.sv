// mg_twiddle_lut: twiddle-factor table W_N^k = exp(-j*2*pi*k/N) for N = 256.
//
// Returns w.re = cos(2*pi*k/N) and w.im = -sin(2*pi*k/N) in Q15 (scaled by
// 32767). Only a quarter wave is stored (mg_pkg::SINE_Q, 65 entries); the
// other quadrants follow from symmetry, and cos(t) = sin(t + pi/2).
// Timing: registered, w belongs to the k of the previous cycle.
// The document only says the twiddle factors come from a lookup table; the
// quarter-wave organisation and the Q15 scaling are this design's choice.
module mg_twiddle_lut
  import mg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] k,
  output cplx16_t    w
);
  function automatic logic signed [15:0] sin256(input logic [7:0] t);
    logic [5:0] r;
    logic [15:0] mag;
    r = t[5:0];
    unique case (t[7:6])
      2'd0:    mag = SINE_Q[7'(r)];
      2'd1:    mag = SINE_Q[64 - 7'(r)];
      2'd2:    mag = SINE_Q[7'(r)];
      default: mag = SINE_Q[64 - 7'(r)];
    endcase
    return t[7] ? -$signed(mag) : $signed(mag);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) w <= '0;
    else begin
      w.re <= sin256(k + 8'd64);
      w.im <= -sin256(k);
    end
  end
endmodule
