// mg_fir12: 12-tap FIR filter, y[n] = b0 x[n] + b1 x[n-1] + ... + b11 x[n-11].
//
// Transposed form, as mapped on the fabric: the input sample is broadcast
// (over the global network) to all TAPS coefficient multipliers at once, and
// the products are summed by a chain of ACC_W-bit adders with a pipeline
// register after each adder. The adder of tap 11 starts the chain, the adder
// of tap 0 delivers y. Samples are 16-bit two's complement; coefficients are
// Q15 fractions in [-1,1); each product x*b is kept as a 20-bit value with 4
// fraction bits, p = (x*b) >>> 11, so y carries 4 more fraction bits than x.
// Sums wrap in 20 bits (|sum of |b_i|| must stay below 16 to be safe).
// The chain advances on valid products only, so gaps in the input stream are
// allowed. Timing: one sample per cycle; y/y_valid for x[n] appear LATENCY
// (61) cycles after x[n] is presented with x_valid: the 13-cycle multiplier,
// the adder of tap 0 and the latches of the network.
// Following the document: structure (Fig. 13), 12 taps, 16-bit input, 20-bit
// adders, coefficient range, latency. This design's own choice: Q15
// coefficients, the 4 extra fraction bits, coefficients as static ports.
module mg_fir12 #(
  parameter int unsigned TAPS    = 12,
  parameter int unsigned X_W     = 16,
  parameter int unsigned ACC_W   = 20,
  parameter int unsigned LATENCY = 61
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    x_valid,
  input  logic signed [X_W-1:0]   x,
  input  logic signed [X_W-1:0]   coef [TAPS],
  output logic                    y_valid,
  output logic signed [ACC_W-1:0] y
);
  localparam int unsigned MULT_LAT = 13;
  localparam int unsigned DROP     = 2*X_W - 1 - ACC_W;   // 11 for 16/20

  logic [2*X_W-1:0]        prod [TAPS];
  logic                    p_valid;
  logic signed [ACC_W-1:0] acc  [TAPS];

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    mg_fx_mult #(.W(X_W), .LATENCY(MULT_LAT)) u_mult (
      .clk(clk), .rst_n(rst_n), .a(x), .b(coef[i]), .is_signed(1'b1), .p(prod[i])
    );
  end

  mg_delay #(.W(1), .DEPTH(MULT_LAT)) u_vpipe (
    .clk(clk), .rst_n(rst_n), .d(x_valid), .q(p_valid)
  );

  function automatic logic signed [ACC_W-1:0] scale(input logic [2*X_W-1:0] p);
    logic signed [2*X_W-1:0] ps;
    ps = $signed(p) >>> DROP;
    return ps[ACC_W-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) acc[i] <= '0;
    end else if (p_valid) begin
      acc[TAPS-1] <= scale(prod[TAPS-1]);
      for (int i = 0; i < TAPS-1; i++) acc[i] <= scale(prod[i]) + acc[i+1];
    end
  end

  logic v_chain;
  always_ff @(posedge clk) begin
    if (!rst_n) v_chain <= 1'b0;
    else        v_chain <= p_valid;
  end

  mg_delay #(.W(1 + ACC_W), .DEPTH(LATENCY - MULT_LAT - 1)) u_pipe (
    .clk(clk), .rst_n(rst_n), .d({v_chain, acc[0]}), .q({y_valid, y})
  );
endmodule
