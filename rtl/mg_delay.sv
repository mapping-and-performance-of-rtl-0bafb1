// mg_delay: fixed pipeline delay of DEPTH clock cycles for a W-bit word.
//
// Models the pipeline latches of the fabric: every mapped module in this
// design computes its result and then passes it through such a delay so that
// the result leaves the module in the cycle the mapped structure delivers it.
// DEPTH = 0 is a plain wire. The registers reset to zero.
module mg_delay #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_pipe
    logic [W-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
      end else begin
        stage[0] <= d;
        for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end
    assign q = stage[DEPTH-1];
  end
endmodule
