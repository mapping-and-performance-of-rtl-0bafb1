// mg_cordic_stage: one stage (iteration STAGE = i) of a CORDIC unit.
//
// Vectoring iteration on 24-bit two's-complement data:
//   y >= 0:  x' = x + (y >>> i),  y' = y - (x >>> i),  z' = z + atan(2^-i)
//   y <  0:  x' = x - (y >>> i),  y' = y + (x >>> i),  z' = z - atan(2^-i)
// so y is driven towards zero while z collects the angle. The small decoder
// looks at the sign of y and picks add or subtract for both adder/subtractors
// and which of the two hard-coded values +/-atan(2^-i) the constant adder
// uses. The shifts are fixed for a stage (in the mapping, hardwired
// connections plus a shifter of at most four bits). z is a binary angle,
// 2^23 units = pi (see mg_pkg::CORDIC_ATAN).
// Timing: one sample per cycle; outputs appear LATENCY (17) cycles after the
// inputs, out_valid follows in_valid.
// Following the document: the update equations, direction from the sign of
// y, constants hard-coded per stage, 24-bit data, 17-cycle latency. This
// design's own choice: the angle unit and that y = 0 counts as positive.
module mg_cordic_stage
  import mg_pkg::*;
#(
  parameter int unsigned W       = 24,
  parameter int unsigned STAGE   = 0,
  parameter int unsigned LATENCY = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic signed [W-1:0] z_in,
  output logic                out_valid,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out,
  output logic signed [W-1:0] z_out
);
  localparam logic signed [W-1:0] F_POS = W'(CORDIC_ATAN[STAGE]);
  localparam logic signed [W-1:0] F_NEG = -F_POS;

  logic                v1;
  logic signed [W-1:0] x1, y1, z1;
  logic                y_neg;

  assign y_neg = y_in[W-1];   // the decoder

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1 <= 1'b0; x1 <= '0; y1 <= '0; z1 <= '0;
    end else begin
      v1 <= in_valid;
      if (!y_neg) begin
        x1 <= x_in + (y_in >>> STAGE);
        y1 <= y_in - (x_in >>> STAGE);
        z1 <= z_in + F_POS;
      end else begin
        x1 <= x_in - (y_in >>> STAGE);
        y1 <= y_in + (x_in >>> STAGE);
        z1 <= z_in + F_NEG;
      end
    end
  end

  mg_delay #(.W(1 + 3*W), .DEPTH(LATENCY - 1)) u_pipe (
    .clk(clk), .rst_n(rst_n), .d({v1, x1, y1, z1}), .q({out_valid, x_out, y_out, z_out})
  );
endmodule
