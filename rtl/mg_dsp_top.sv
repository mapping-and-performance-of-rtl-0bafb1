// mg_dsp_top: the medium-grain reconfigurable device with the DSP modules
// and benchmarks that are mapped onto it.
//
// Side by side, each with its own ports:
//  * fab_*   the cell array itself (mg_fabric: cells, local mesh, H-tree),
//            configured through its cfg ports;
//  * add_*   the pipelined digit-serial 32-bit adder built from cells;
//  * mul_*   the 16-bit fixed-point multiplier;
//  * sh_*    the 16-bit logarithmic left shifter;
//  * fpa_*   the hybrid-format floating-point adder (latency 57);
//  * fpm_*   the hybrid-format floating-point multiplier (latency 74);
//  * fir_*   the 12-tap FIR filter (latency 61);
//  * cor_*   the 16-stage CORDIC unit (latency 313);
//  * fft_*   the 256-point radix-4 FFT (524 cycles per transform).
// In the device these are alternative configurations of one cell array;
// here each is a block of its own so that all of them can be exercised.
// All blocks share clk and the active-low synchronous reset rst_n. Timing
// and formats of every group are those of the block named above.
module mg_dsp_top
  import mg_pkg::*;
#(
  parameter int unsigned FAB_N  = 32,
  localparam int unsigned FAB_L = 2 * $clog2(FAB_N)
) (
  input  logic               clk,
  input  logic               rst_n,
  // cell array
  input  src_e               fab_cfg_src     [FAB_N][FAB_N][4],
  input  digit_t             fab_cfg_const   [FAB_N][FAB_N],
  input  out_e               fab_cfg_out     [FAB_N][FAB_N][8],
  input  logic               fab_cfg_glb_hi  [FAB_N][FAB_N],
  input  logic [FAB_L-1:0]   fab_cfg_glb_src [FAB_N][FAB_N],
  input  logic               fab_cfg_glb_en  [FAB_N][FAB_N],
  input  digit_t             fab_ext_in      [FAB_N],
  output digit_t             fab_ext_out     [FAB_N],
  output logic [7:0]         fab_cell_y      [FAB_N][FAB_N],
  // digit-serial adder
  input  digit_t             add_x_dig [8],
  input  digit_t             add_y_dig [8],
  input  logic               add_cin,
  output digit_t             add_s_dig [8],
  output logic               add_cout,
  // fixed-point multiplier
  input  logic [15:0]        mul_a,
  input  logic [15:0]        mul_b,
  input  logic               mul_signed,
  output logic [31:0]        mul_p,
  // shifter
  input  logic [15:0]        sh_d,
  input  logic [3:0]         sh_amt,
  output logic [15:0]        sh_q,
  // floating-point adder
  input  logic               fpa_in_valid,
  input  hfp_t               fpa_x,
  input  hfp_t               fpa_y,
  output logic               fpa_out_valid,
  output hfp_t               fpa_z,
  // floating-point multiplier
  input  logic               fpm_in_valid,
  input  hfp_t               fpm_x,
  input  hfp_t               fpm_y,
  output logic               fpm_out_valid,
  output hfp_t               fpm_z,
  // FIR filter
  input  logic               fir_x_valid,
  input  logic signed [15:0] fir_x,
  input  logic signed [15:0] fir_coef [12],
  output logic               fir_y_valid,
  output logic signed [19:0] fir_y,
  // CORDIC
  input  logic               cor_in_valid,
  input  logic signed [15:0] cor_x,
  input  logic signed [15:0] cor_y,
  output logic               cor_out_valid,
  output logic signed [23:0] cor_mag,
  output logic signed [23:0] cor_angle,
  // FFT
  input  logic               fft_load_en,
  input  logic [7:0]         fft_load_idx,
  input  cplx16_t            fft_load_data,
  input  logic               fft_start,
  output logic               fft_busy,
  output logic               fft_done,
  input  logic [7:0]         fft_rd_idx,
  output cplx16_t            fft_rd_data
);
  mg_fabric #(.ROWS(FAB_N), .COLS(FAB_N)) u_fabric (
    .clk, .rst_n,
    .cfg_src(fab_cfg_src), .cfg_const(fab_cfg_const), .cfg_out(fab_cfg_out),
    .cfg_glb_hi(fab_cfg_glb_hi), .cfg_glb_src(fab_cfg_glb_src), .cfg_glb_en(fab_cfg_glb_en),
    .ext_in(fab_ext_in), .ext_out(fab_ext_out), .cell_y(fab_cell_y)
  );

  mg_fx_adder #(.DIGITS(8)) u_add (
    .clk, .rst_n, .x_dig(add_x_dig), .y_dig(add_y_dig), .cin(add_cin),
    .s_dig(add_s_dig), .cout(add_cout)
  );

  mg_fx_mult #(.W(16), .LATENCY(13)) u_mul (
    .clk, .rst_n, .a(mul_a), .b(mul_b), .is_signed(mul_signed), .p(mul_p)
  );

  mg_log_shifter #(.W(16), .LATENCY(14)) u_sh (
    .clk, .rst_n, .d(sh_d), .sh(sh_amt), .q(sh_q)
  );

  mg_fp_adder u_fpa (
    .clk, .rst_n, .in_valid(fpa_in_valid),
    .xs(fpa_x.sig), .xe(fpa_x.exp), .ys(fpa_y.sig), .ye(fpa_y.exp),
    .out_valid(fpa_out_valid), .zs(fpa_z.sig), .ze(fpa_z.exp)
  );

  mg_fp_mult u_fpm (
    .clk, .rst_n, .in_valid(fpm_in_valid),
    .xs(fpm_x.sig), .xe(fpm_x.exp), .ys(fpm_y.sig), .ye(fpm_y.exp),
    .out_valid(fpm_out_valid), .zs(fpm_z.sig), .ze(fpm_z.exp)
  );

  mg_fir12 u_fir (
    .clk, .rst_n, .x_valid(fir_x_valid), .x(fir_x), .coef(fir_coef),
    .y_valid(fir_y_valid), .y(fir_y)
  );

  mg_cordic16 u_cordic (
    .clk, .rst_n, .in_valid(cor_in_valid), .x_in(cor_x), .y_in(cor_y),
    .out_valid(cor_out_valid), .mag(cor_mag), .angle(cor_angle)
  );

  mg_fft256 u_fft (
    .clk, .rst_n, .load_en(fft_load_en), .load_idx(fft_load_idx), .load_data(fft_load_data),
    .start(fft_start), .busy(fft_busy), .done(fft_done),
    .rd_idx(fft_rd_idx), .rd_data(fft_rd_data)
  );
endmodule
