// mg_log_shifter: W-bit logarithmic left shifter (16-bit in the document).
//
// Three rows of cells: the first row shifts the data left by 0 to 3 bits
// (sh[1:0]); the second row is a multiplexer that applies an optional shift
// of 4 bits (sh[2]); the third an optional shift of 8 bits (sh[3]). Zeros
// enter from the right. Each row is a registered pipeline stage; the result
// then passes the pipeline latches of the network so that q holds the shift
// of the d presented LATENCY cycles earlier (the last output digit of the
// document's mapping is complete in cycle 14). One shift may start per cycle.
// Following the document: the three-row structure and its shift steps, the
// width. This design's own choice: word-parallel ports and a 4-bit shift
// amount, which makes the first row cover 0 to 3 bits.
module mg_log_shifter #(
  parameter int unsigned W       = 16,
  parameter int unsigned LATENCY = 14
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic [3:0]   sh,
  output logic [W-1:0] q
);
  logic [W-1:0] row1, row2, row3;
  logic [3:2]   sh1;
  logic         sh2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row1 <= '0; row2 <= '0; row3 <= '0; sh1 <= '0; sh2 <= 1'b0;
    end else begin
      row1 <= d << sh[1:0];
      sh1  <= sh[3:2];
      row2 <= sh1[2] ? (row1 << 4) : row1;
      sh2  <= sh1[3];
      row3 <= sh2 ? (row2 << 8) : row2;
    end
  end

  mg_delay #(.W(W), .DEPTH(LATENCY - 3)) u_pipe (
    .clk(clk), .rst_n(rst_n), .d(row3), .q(q)
  );
endmodule
