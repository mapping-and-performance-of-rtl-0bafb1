// mg_cell: one 4-bit cell of the medium-grain fabric.
//
// A cell is a 4x4 matrix of 1-bit lookup-table elements that is configured in
// one of two modes (mode input, held static by the configuration):
//  * mathematics mode: the element array works as a small carry-save
//    multiplier-adder. With operands a and b on the array and two addends c
//    and d, the cell produces the 8-bit result y = a*b + c + d, which never
//    overflows (15*15 + 15 + 15 = 255). y[3:0] is the low digit, y[7:4] the
//    carry digit. With b = 1 the cell is a 4-bit adder with carry in d.
//  * memory mode: the 16 elements (32 bits each) form a 128 x 4-bit RAM with
//    a separate write port (we, wa, wi) and read port (ra, ro).
// Timing: the cell takes one clock cycle: y is registered, and the memory read
// is synchronous (ro holds the word at ra in the previous cycle; a read and a
// write of the same address in one cycle return the old word).
// Following the document: the two modes, the 4-bit operands and 8-bit math
// result, the 128x4 memory with separate ports, one cycle per cell. This
// design's own choice: the math function a*b + c + d (the document shows the
// multiplier-like array but not the element contents), unsigned operands,
// and the exact port set of the memory mode.
module mg_cell #(
  parameter int unsigned ADDR_W = 7
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mode,   // 0: mathematics, 1: memory
  // mathematics mode
  input  logic [3:0]        a,
  input  logic [3:0]        b,
  input  logic [3:0]        c,
  input  logic [3:0]        d,
  output logic [7:0]        y,
  // memory mode
  input  logic              we,
  input  logic [ADDR_W-1:0] wa,
  input  logic [3:0]        wi,
  input  logic [ADDR_W-1:0] ra,
  output logic [3:0]        ro
);
  logic [3:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (!rst_n)     y <= '0;
    else if (!mode) y <= 8'(a * b) + 8'(c) + 8'(d);
  end

  always_ff @(posedge clk) begin
    if (mode && we) mem[wa] <= wi;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)    ro <= '0;
    else if (mode) ro <= mem[ra];
  end
endmodule
