// mg_fft256: 256-point radix-4 FFT built from the memory unit, the dragonfly
// kernel and three twiddle tables.
//
// Algorithm (constant-geometry radix-4, decimation in time): the input is
// stored in base-4 digit-reversed order; each of the four stages runs the 64
// groups g = 0..63, where group g reads samples 4g .. 4g+3, applies twiddles
// W^(m*t) with t = (g >> (6 - 2s)) << (6 - 2s) for stage s, and writes its
// output q to sample g + 64q. After stage 3 the memory holds X[k]/256 in
// natural order. Because output q always lands in row q of the memory unit,
// the four writes of a group never collide, and the four reads are free
// because every column holds a full copy.
// Sequencing: a new group is issued every cycle; the kernel spans KERNEL_LAT
// (68) cycles from read address to write, so a stage takes
// 64 - 1 + KERNEL_LAT = 131 cycles and the transform 4 * 131 = 524 cycles
// from start to done. Banks alternate per stage (read bank = s[0]).
// Interface: while idle, load_en writes sample load_idx (natural order; the
// digit reversal is done here) and rd_idx reads result k, rd_data valid one
// cycle later. start begins a transform in the next cycle; busy is then high
// for 524 cycles and done is high in the last of them. Loading and reading are ignored while busy.
// Following the document: radix-4 kernel, four stages of 64 groups, eight
// memory accesses per cycle, 68-cycle kernel, 131 cycles per stage. This
// design's own choice: the constant-geometry ordering and the load/unload
// ports.
module mg_fft256
  import mg_pkg::*;
#(
  parameter int unsigned KERNEL_LAT = 68
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load_en,
  input  logic [7:0] load_idx,
  input  cplx16_t    load_data,
  input  logic       start,
  output logic       busy,
  output logic       done,
  input  logic [7:0] rd_idx,
  output cplx16_t    rd_data
);
  localparam int unsigned STAGE_CYC = 63 + KERNEL_LAT;

  typedef enum logic {S_IDLE, S_RUN} state_e;
  state_e      state;
  logic [1:0]  stage;
  logic [7:0]  cyc;

  // ---- sequencer -------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; stage <= '0; cyc <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN; stage <= '0; cyc <= '0;
        end
        S_RUN: begin
          if (cyc == 8'(STAGE_CYC - 1)) begin
            cyc <= '0;
            if (stage == 2'd3) state <= S_IDLE;
            else               stage <= stage + 2'd1;
          end else begin
            cyc <= cyc + 8'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
  assign busy = (state == S_RUN);
  assign done = busy && stage == 2'd3 && cyc == 8'(STAGE_CYC - 1);

  // ---- group issue -------------------------------------------------------
  logic       issue;
  logic [5:0] g;
  logic [7:0] t;
  assign issue = busy && (cyc < 8'd64);
  assign g     = cyc[5:0];
  always_comb begin
    unique case (stage)
      2'd0:    t = 8'd0;
      2'd1:    t = {2'b00, g & 6'h30};
      2'd2:    t = {2'b00, g & 6'h3C};
      default: t = {2'b00, g};
    endcase
  end

  // ---- memory unit -----------------------------------------------------
  logic [7:0]  rd_addr  [4];
  logic [31:0] mem_rd   [4];
  logic        wr_en    [4];
  logic [5:0]  wr_entry [4];
  logic [31:0] wr_data  [4];
  logic        rd_bank, wr_bank;

  cplx16_t     kx [4];
  cplx16_t     kw [3];
  cplx16_t     ky [4];
  logic        wv;
  logic [5:0]  wg;
  logic [7:0]  load_pos;

  // base-4 digit reversal of the load index
  assign load_pos = {load_idx[1:0], load_idx[3:2], load_idx[5:4], load_idx[7:6]};

  always_comb begin
    rd_bank = busy ? stage[0] : 1'b0;
    wr_bank = busy ? ~stage[0] : 1'b0;
    for (int m = 0; m < 4; m++) begin
      rd_addr[m]  = busy ? {g, 2'(m)} : rd_idx;
      wr_en[m]    = busy ? wv : (load_en && load_pos[7:6] == 2'(m));
      wr_entry[m] = busy ? wg : load_pos[5:0];
      wr_data[m]  = busy ? ky[m] : load_data;
    end
  end

  mg_fft_mem #(.DATA_W(32), .ENTRIES(64)) u_mem (
    .clk, .rst_n, .rd_bank, .wr_bank, .rd_addr, .rd_data(mem_rd),
    .wr_en, .wr_entry, .wr_data
  );

  // ---- twiddle tables and kernel ----------------------------------------
  for (genvar m = 1; m < 4; m++) begin : g_tw
    logic [7:0] k;
    assign k = 8'(t * m);
    mg_twiddle_lut u_lut (.clk, .rst_n, .k(k), .w(kw[m-1]));
  end

  for (genvar m = 0; m < 4; m++) begin : g_kx
    assign kx[m] = mem_rd[m];
  end

  mg_fft_dragonfly #(.LATENCY(KERNEL_LAT - 2)) u_df (.clk, .rst_n, .x(kx), .w(kw), .y(ky));

  mg_delay #(.W(7), .DEPTH(KERNEL_LAT - 1)) u_track (
    .clk, .rst_n, .d({issue, g}), .q({wv, wg})
  );

  assign rd_data = mem_rd[0];

  a_no_early_start: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> !busy);
endmodule
