// mg_fx_mult: W x W fixed-point multiplier (16-bit in the document).
//
// Mapped on the fabric as a 4x4 block of cells arranged like a carry-save
// array: one operand enters the top row digit-parallel, the other the right
// column digit-serially, and the seven cells on the right and bottom return
// the product digit-serially, the last digit in cycle 13. Here the product is
// formed at word level and handed out whole when its last digit would be
// complete: one operation may start every cycle, and p holds the product of
// the operands presented LATENCY cycles earlier. is_signed selects two's
// complement (both operands signed) or unsigned arithmetic, which the
// document says the cells support.
// Following the document: width, pipelined one-per-cycle operation, both
// number systems, the 13-cycle completion time. This design's own choice:
// word-parallel ports instead of digit-serial ones.
module mg_fx_mult #(
  parameter int unsigned W       = 16,
  parameter int unsigned LATENCY = 13
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic           is_signed,
  output logic [2*W-1:0] p
);
  logic [2*W-1:0] prod;

  always_comb begin
    if (is_signed) prod = (2*W)'($signed(a) * $signed(b));
    else           prod = (2*W)'(a * b);
  end

  mg_delay #(.W(2*W), .DEPTH(LATENCY)) u_pipe (
    .clk(clk), .rst_n(rst_n), .d(prod), .q(p)
  );
endmodule
