// mg_cordic16: high-performance CORDIC built from STAGES cascaded stages.
//
// Computes the rectangular-to-polar conversion of a 16-bit vector (x, y):
// the inputs are sign-extended to 24 bits with 6 extra fraction bits
// (value * 64), z starts at zero, and after the 16 vectoring stages
//   mag   = K * sqrt(x^2 + y^2) * 64,  K = prod sqrt(1 + 2^-2i) ~ 1.6468,
//   angle = atan2(y, x) in binary-angle units (2^23 = pi).
// The result is valid for inputs with x > 0 or small |angle| (CORDIC
// vectoring converges for angles up to about 99.9 degrees); the gain K is not
// removed. Stages are joined over the global network; their link delays are
// lumped into one delay at the output so that the whole unit has LATENCY
// (313) cycles from in_valid to out_valid, and one sample enters per cycle.
// Following the document: 16 stages of 24 bits, latency, throughput of one
// sample per cycle. This design's own choice: the 6-bit input scaling and
// where the network latency is placed.
module mg_cordic16 #(
  parameter int unsigned STAGES    = 16,
  parameter int unsigned STAGE_LAT = 17,
  parameter int unsigned LATENCY   = 313
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [15:0] x_in,
  input  logic signed [15:0] y_in,
  output logic               out_valid,
  output logic signed [23:0] mag,
  output logic signed [23:0] angle
);
  logic               v [STAGES+1];
  logic signed [23:0] x [STAGES+1];
  logic signed [23:0] y [STAGES+1];
  logic signed [23:0] z [STAGES+1];
  logic signed [23:0] y_res_unused;

  assign v[0] = in_valid;
  assign x[0] = {{2{x_in[15]}}, x_in, 6'b0};
  assign y[0] = {{2{y_in[15]}}, y_in, 6'b0};
  assign z[0] = '0;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    mg_cordic_stage #(.W(24), .STAGE(i), .LATENCY(STAGE_LAT)) u_stage (
      .clk(clk), .rst_n(rst_n),
      .in_valid(v[i]), .x_in(x[i]), .y_in(y[i]), .z_in(z[i]),
      .out_valid(v[i+1]), .x_out(x[i+1]), .y_out(y[i+1]), .z_out(z[i+1])
    );
  end

  assign y_res_unused = y[STAGES];

  mg_delay #(.W(1 + 48), .DEPTH(LATENCY - STAGES*STAGE_LAT)) u_link (
    .clk(clk), .rst_n(rst_n), .d({v[STAGES], x[STAGES], z[STAGES]}),
    .q({out_valid, mag, angle})
  );
endmodule
