// mg_local_xbar: the crossbar switch that joins one cell to the local mesh.
//
// The local mesh runs 4-bit busses horizontally, vertically and diagonally,
// so each cell sees its eight neighbours (dir_e order N, NE, E, SE, S, SW, W,
// NW). On the input side the crossbar picks each of the cell's four operands
// (a, b, c, d) from a neighbour bus, from the global network, from a
// configured constant digit or zero. On the output side it drives each of the
// eight outgoing busses with the cell's low digit, high digit or nothing
// (zero). The outgoing busses pass through the mesh's pipeline latch, so a
// value leaves the neighbour-facing ports one clock after the cell result
// appears: one cycle of local communication per hop, as in the document.
// Configuration (cfg_*) is static. The selection codes and the constant digit
// are this design's own encoding; the document gives the mesh and the
// crossbar but no configuration format.
module mg_local_xbar
  import mg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // configuration
  input  src_e       cfg_src   [4],   // source of operand a, b, c, d
  input  digit_t     cfg_const,       // constant digit for SRC_CONST
  input  out_e       cfg_out   [8],   // what drives each outgoing bus
  // mesh and cell side
  input  digit_t     nbr_in    [8],   // incoming busses from the neighbours
  input  digit_t     glb_in,          // digit from the global network
  input  logic [7:0] cell_y,          // cell result (low and high digit)
  output digit_t     cell_in   [4],   // operands a, b, c, d of the cell
  output digit_t     nbr_out   [8]    // latched busses to the neighbours
);
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      unique case (cfg_src[k])
        SRC_GLB:   cell_in[k] = glb_in;
        SRC_CONST: cell_in[k] = cfg_const;
        SRC_ZERO:  cell_in[k] = '0;
        default:   cell_in[k] = nbr_in[cfg_src[k][2:0]];
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) nbr_out[k] <= '0;
    end else begin
      for (int k = 0; k < 8; k++) begin
        unique case (cfg_out[k])
          OUT_LO:  nbr_out[k] <= cell_y[3:0];
          OUT_HI:  nbr_out[k] <= cell_y[7:4];
          default: nbr_out[k] <= '0;
        endcase
      end
    end
  end
endmodule
