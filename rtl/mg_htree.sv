// mg_htree: the global H-tree network of the fabric.
//
// The cells are the 2^LEVELS leaves of a binary H-tree. Leaves are numbered
// in tree order, so two leaves whose numbers differ only in bit k and below
// meet at the switch of level k+1. Each bus of level k is 4*2^k bits wide:
// the width doubles at every level, so a bus carries every digit of the
// subtree below it and no two routes ever contend for a bus. Switches route
// data in word units, and a pipeline latch sits on every second bus, so the
// latency from one cell to another is half the number of busses traversed:
// a route whose two leaves meet at the switch of level L climbs L busses and
// descends L busses and takes L clock cycles (1 cycle for two sibling cells,
// 4 cycles across a 16-cell tree, LEVELS cycles across the whole device).
//
// Interface: leaf_in[i] is the digit cell i drives onto the tree.
// cfg_src[d] names the leaf whose digit leaf d receives and cfg_en[d] turns
// the route on; a disabled destination receives zero. A leaf routed to
// itself receives its own digit one cycle later (it meets itself at the first
// switch). Configuration is static.
//
// Following the document: the tree, the doubling bus width, word routing and
// the latency rule. This design's own choice: the network is written as the
// latency rule (a history of every leaf's digits and a selection per
// destination) rather than as individual switches, and the configuration
// format. The document mentions, but does not use, capping the bus width;
// that option is not built.
module mg_htree
  import mg_pkg::*;
#(
  parameter int unsigned LEVELS = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  digit_t            leaf_in  [2**LEVELS],
  input  logic [LEVELS-1:0] cfg_src  [2**LEVELS],
  input  logic              cfg_en   [2**LEVELS],
  output digit_t            leaf_out [2**LEVELS]
);
  localparam int unsigned NLEAF = 2**LEVELS;

  // hist[i][k]: the digit leaf i drove k+1 cycles ago (a shift register per
  // leaf).
  digit_t [LEVELS-1:0] hist [NLEAF];

  for (genvar i = 0; i < NLEAF; i++) begin : g_leaf
    always_ff @(posedge clk) begin
      if (!rst_n) hist[i] <= '0;
      else        hist[i] <= {hist[i][LEVELS-2:0], leaf_in[i]};
    end
  end

  // Level of the switch where source and destination meet = index of the
  // highest differing address bit + 1 (1 when they are the same leaf).
  function automatic int unsigned meet_level(input logic [LEVELS-1:0] s,
                                             input logic [LEVELS-1:0] d);
    logic [LEVELS-1:0] diff;
    int unsigned lvl;
    diff = s ^ d;
    lvl = 1;
    for (int k = 0; k < LEVELS; k++)
      if (diff[k]) lvl = k + 1;
    return lvl;
  endfunction

  for (genvar g = 0; g < NLEAF; g++) begin : g_dst
    always_comb begin
      if (cfg_en[g])
        leaf_out[g] = hist[cfg_src[g]][meet_level(cfg_src[g], LEVELS'(g)) - 1];
      else
        leaf_out[g] = '0;
    end
  end
endmodule
