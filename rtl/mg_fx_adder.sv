// mg_fx_adder: pipelined digit-serial ripple-carry adder built from cells.
//
// DIGITS cells (eight for the 32-bit adder of the document) sit in a row;
// cell k adds digit k of both operands and the carry of cell k-1. Each cell
// is a mg_cell in mathematics mode with b = 1, so y = x_k + y_k + carry; its
// low digit is sum digit k and bit 4 is the carry. The carry travels to the
// next cell over the local network, whose pipeline latch adds one cycle, so
// cell k works two cycles after cell k-1.
//
// Timing (one operation may start every clock cycle): digit k of an operation
// started in cycle t must be presented on x_dig[k] / y_dig[k] in cycle
// t + 2k, and sum digit k appears on s_dig[k] in cycle t + 2k + 1, i.e. the
// sum comes out digit-serially in cycles 1, 3, 5, ..., 15 as in the
// document's figure. cin enters with digit 0 (cycle t); cout leaves with the
// top digit (cycle t + 2*DIGITS - 1). Upstream modules are expected to supply
// the operands in the same digit-serial order.
module mg_fx_adder
  import mg_pkg::*;
#(
  parameter int unsigned DIGITS = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  digit_t x_dig [DIGITS],
  input  digit_t y_dig [DIGITS],
  input  logic   cin,
  output digit_t s_dig [DIGITS],
  output logic   cout
);
  logic [7:0] cell_y    [DIGITS];
  logic       carry_in  [DIGITS];
  logic       carry_lat [DIGITS];   // local-network latch after each cell
  logic [3:0] ro_unused [DIGITS];

  for (genvar k = 0; k < DIGITS; k++) begin : g_cell
    if (k == 0) begin : g_first
      assign carry_in[k] = cin;
    end else begin : g_next
      assign carry_in[k] = carry_lat[k-1];
    end

    mg_cell u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .mode (1'b0),
      .a    (x_dig[k]),
      .b    (4'd1),
      .c    (y_dig[k]),
      .d    ({3'b000, carry_in[k]}),
      .y    (cell_y[k]),
      .we   (1'b0),
      .wa   ('0),
      .wi   ('0),
      .ra   ('0),
      .ro   (ro_unused[k])
    );

    always_ff @(posedge clk) begin
      if (!rst_n) carry_lat[k] <= 1'b0;
      else        carry_lat[k] <= cell_y[k][4];
    end

    assign s_dig[k] = cell_y[k][3:0];
  end

  assign cout = cell_y[DIGITS-1][4];
endmodule
