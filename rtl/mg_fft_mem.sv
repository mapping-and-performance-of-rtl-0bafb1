// mg_fft_mem: the FFT memory unit that feeds and collects the radix-4 kernel.
//
// Cells in memory mode form a 4x4 grid (per 4-bit slice of a sample; the
// DATA_W/4 slices are stacked and share all addressing, so this module keeps
// whole samples). Every cell divides its memory into two banks, one being
// read while the other is written, with separate address and control.
//  * Row r is the write memory of kernel output r: write port r stores a
//    sample at entry wr_entry[r] of every cell in row r.
//  * Column c is the read memory of kernel input c: read port c fetches entry
//    rd_addr[c][5:0] from the cell of column c in row rd_addr[c][7:6].
// So the four kernel inputs can read any four samples at once, and the four
// outputs write at once, each into its own row: eight accesses per cycle.
// A sample index i thus lives in row i[7:6], entry i[5:0] (ENTRIES = 64 =
// half of a 128-word cell memory).
// rd_bank selects the bank the read ports use, wr_bank the bank the write
// ports use; in normal operation they differ. Reads are synchronous: rd_data
// holds the word addressed in the previous cycle.
// Following the document: the grid, row-write/column-read organisation, the
// two banks per cell. This design's own choice: the address layout and the
// separate bank selects.
module mg_fft_mem #(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned ENTRIES = 64
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               rd_bank,
  input  logic                               wr_bank,
  input  logic [1+$clog2(ENTRIES):0]         rd_addr  [4],
  output logic [DATA_W-1:0]                  rd_data  [4],
  input  logic                               wr_en    [4],
  input  logic [$clog2(ENTRIES)-1:0]         wr_entry [4],
  input  logic [DATA_W-1:0]                  wr_data  [4]
);
  localparam int unsigned EW = $clog2(ENTRIES);

  // cmem[r][c]: the cell in row r, column c; two banks of ENTRIES words
  logic [DATA_W-1:0] cmem [4][4][2][ENTRIES];

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      always_ff @(posedge clk) begin
        if (wr_en[r]) cmem[r][c][wr_bank][wr_entry[r]] <= wr_data[r];
      end
    end
  end

  for (genvar c = 0; c < 4; c++) begin : g_rd
    always_ff @(posedge clk) begin
      if (!rst_n) rd_data[c] <= '0;
      else        rd_data[c] <= cmem[rd_addr[c][EW+1:EW]][c][rd_bank][rd_addr[c][EW-1:0]];
    end
  end
endmodule
