// mg_fabric: the medium-grain reconfigurable array of 4-bit cells.
//
// ROWS x COLS cells (mg_cell), each joined to the local mesh by its own
// crossbar switch (mg_local_xbar), and all of them leaves of one global
// H-tree (mg_htree). A cell hands its result to its neighbours through the
// crossbar's pipeline latch: a computation takes one cycle in the cell and
// one cycle on the local mesh. Every cell also drives one digit onto the
// global tree (its low digit, or its high digit if cfg_glb_hi is set) and
// receives one digit from it (operand source SRC_GLB).
// Geometry: mesh neighbours are the eight cells around (r, c); busses that
// would leave the array read zero, except that the west bus of column 0
// carries ext_in[r] and the east bus driven by column COLS-1 is ext_out[r].
// H-tree leaves are numbered by interleaving the bits of row and column
// (leaf = {r[k], c[k], ..., r[0], c[0]}), which is the tree order of an
// H-tree that alternately splits columns and rows; ROWS = COLS must be a
// power of two and LEVELS = 2*log2(ROWS).
// Configuration arrives on static cfg_* ports, one entry per cell.
// All cells work in mathematics mode here; the document gives no routing of
// the memory-mode address and data busses through the mesh, so memory-mode
// cells are used through mg_cell directly (as in mg_fft_mem's organisation).
// Following the document: 4-bit cells, eight-neighbour latched mesh,
// crossbars, the global H-tree and its latency. This design's own choice:
// the configuration encoding, the edge I/O and the leaf numbering.
module mg_fabric
  import mg_pkg::*;
#(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 32,
  localparam int unsigned LEVELS = 2 * $clog2(ROWS)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration, one entry per cell
  input  src_e                    cfg_src     [ROWS][COLS][4],
  input  digit_t                  cfg_const   [ROWS][COLS],
  input  out_e                    cfg_out     [ROWS][COLS][8],
  input  logic                    cfg_glb_hi  [ROWS][COLS],
  input  logic [LEVELS-1:0]       cfg_glb_src [ROWS][COLS],
  input  logic                    cfg_glb_en  [ROWS][COLS],
  // edge I/O
  input  digit_t                  ext_in      [ROWS],
  output digit_t                  ext_out     [ROWS],
  // result of every cell, for observation
  output logic [7:0]              cell_y      [ROWS][COLS]
);
  localparam int unsigned LB     = $clog2(ROWS);
  localparam int unsigned NLEAF  = ROWS * COLS;

  // row / column offsets of the eight directions, order of dir_e
  localparam int DR [8] = '{-1, -1, 0, 1, 1, 1, 0, -1};
  localparam int DC [8] = '{ 0,  1, 1, 1, 0, -1, -1, -1};

  digit_t            nbr_out  [ROWS][COLS][8];
  digit_t            leaf_in  [NLEAF];
  digit_t            leaf_out [NLEAF];
  logic [LEVELS-1:0] tree_src [NLEAF];
  logic              tree_en  [NLEAF];

  function automatic int unsigned leaf_of(input int unsigned r, input int unsigned c);
    int unsigned l;
    l = 0;
    for (int k = 0; k < LB; k++) begin
      l |= ((c >> k) & 1) << (2*k);
      l |= ((r >> k) & 1) << (2*k + 1);
    end
    return l;
  endfunction

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      localparam int unsigned LEAF = leaf_of(r, c);
      digit_t     nbr_in  [8];
      digit_t     opnd    [4];
      logic [3:0] ro_unused;

      // incoming bus from direction k = the neighbour's bus facing back
      for (genvar k = 0; k < 8; k++) begin : g_dir
        localparam int NR = int'(r) + DR[k];
        localparam int NC = int'(c) + DC[k];
        if (k == int'(DIR_W) && c == 0) begin : g_ext
          assign nbr_in[k] = ext_in[r];
        end else if (NR < 0 || NR >= int'(ROWS) || NC < 0 || NC >= int'(COLS)) begin : g_edge
          assign nbr_in[k] = '0;
        end else begin : g_link
          assign nbr_in[k] = nbr_out[NR][NC][(k + 4) % 8];
        end
      end

      mg_local_xbar u_xbar (
        .clk, .rst_n,
        .cfg_src  (cfg_src[r][c]),
        .cfg_const(cfg_const[r][c]),
        .cfg_out  (cfg_out[r][c]),
        .nbr_in   (nbr_in),
        .glb_in   (leaf_out[LEAF]),
        .cell_y   (cell_y[r][c]),
        .cell_in  (opnd),
        .nbr_out  (nbr_out[r][c])
      );

      mg_cell #(.ADDR_W(7)) u_cell (
        .clk, .rst_n,
        .mode(1'b0),
        .a(opnd[0]), .b(opnd[1]), .c(opnd[2]), .d(opnd[3]),
        .y(cell_y[r][c]),
        .we(1'b0), .wa('0), .wi('0), .ra('0), .ro(ro_unused)
      );

      assign leaf_in[LEAF]  = cfg_glb_hi[r][c] ? cell_y[r][c][7:4] : cell_y[r][c][3:0];
      assign tree_src[LEAF] = cfg_glb_src[r][c];
      assign tree_en[LEAF]  = cfg_glb_en[r][c];
    end
    assign ext_out[r] = nbr_out[r][COLS-1][DIR_E];
  end

  mg_htree #(.LEVELS(LEVELS)) u_tree (
    .clk, .rst_n, .leaf_in, .cfg_src(tree_src), .cfg_en(tree_en), .leaf_out
  );
endmodule
