// tb_mg_fabric: self-checking test of the cell array (4 x 4 cells, a 16-leaf
// H-tree). Several random configurations are loaded (operand sources, output
// busses, tree routes, constants) and the array runs 60 cycles on each with
// random edge inputs. A cycle-by-cycle model of the array written here (cells
// compute a*b + c + d, mesh busses are latched, tree routes take as many
// cycles as the level where the two cells meet) predicts every cell result
// and every east-edge output, which are compared after each clock edge.
// The test also counts that mesh hops, edge inputs and tree routes of every
// latency 1..4 were actually used.
module tb_mg_fabric;
  import mg_pkg::*;
  localparam int R = 4, C = 4, L = 4, NL = 16;
  logic   clk = 0, rst_n = 0;
  src_e   cfg_src     [R][C][4];
  digit_t cfg_const   [R][C];
  out_e   cfg_out     [R][C][8];
  logic   cfg_glb_hi  [R][C];
  logic [L-1:0] cfg_glb_src [R][C];
  logic   cfg_glb_en  [R][C];
  digit_t ext_in  [R];
  digit_t ext_out [R];
  logic [7:0] cell_y [R][C];
  // model state
  logic [7:0] my   [R][C];
  digit_t     mout [R][C][8];
  digit_t     mhist [L][NL];
  int checks = 0, failures = 0;
  int n_mesh = 0, n_ext = 0, n_lat [L+1];
  int dr [8] = '{-1, -1, 0, 1, 1, 1, 0, -1};
  int dc [8] = '{ 0,  1, 1, 1, 0, -1, -1, -1};

  mg_fabric #(.ROWS(R), .COLS(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int leaf(input int r, input int c);
    return ((r >> 1) & 1) << 3 | ((c >> 1) & 1) << 2 | (r & 1) << 1 | (c & 1);
  endfunction

  function automatic int meet(input int s, input int d);
    int l = 1;
    for (int k = 0; k < L; k++) if (((s ^ d) >> k) & 1) l = k + 1;
    return l;
  endfunction

  function automatic digit_t bus_in(input int r, input int c, input int k);
    int nr, nc;
    if (k == 6 && c == 0) return ext_in[r];
    nr = r + dr[k]; nc = c + dc[k];
    if (nr < 0 || nr >= R || nc < 0 || nc >= C) return 4'd0;
    return mout[nr][nc][(k + 4) % 8];
  endfunction

  function automatic digit_t glb(input int r, input int c);
    int s, d;
    if (!cfg_glb_en[r][c]) return 4'd0;
    s = int'(cfg_glb_src[r][c]); d = leaf(r, c);
    return mhist[meet(s, d) - 1][s];
  endfunction

  function automatic digit_t operand(input int r, input int c, input int k);
    case (cfg_src[r][c][k])
      SRC_GLB:   return glb(r, c);
      SRC_CONST: return cfg_const[r][c];
      SRC_ZERO:  return 4'd0;
      default:   return bus_in(r, c, int'(cfg_src[r][c][k]));
    endcase
  endfunction

  task automatic model_step();
    logic [7:0] ny [R][C];
    digit_t     no [R][C][8];
    digit_t     leafv [NL];
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        digit_t a, b, cc, d;
        a = operand(r, c, 0); b = operand(r, c, 1); cc = operand(r, c, 2); d = operand(r, c, 3);
        ny[r][c] = 8'(a) * 8'(b) + 8'(cc) + 8'(d);
        for (int k = 0; k < 8; k++)
          no[r][c][k] = (cfg_out[r][c][k] == OUT_LO) ? my[r][c][3:0] :
                        (cfg_out[r][c][k] == OUT_HI) ? my[r][c][7:4] : 4'd0;
        leafv[leaf(r, c)] = cfg_glb_hi[r][c] ? my[r][c][7:4] : my[r][c][3:0];
      end
    for (int k = L - 1; k > 0; k--) mhist[k] = mhist[k-1];
    mhist[0] = leafv;
    my = ny;
    mout = no;
  endtask

  initial begin
    for (int r = 0; r < R; r++) begin
      ext_in[r] = 0;
      for (int c = 0; c < C; c++) begin
        for (int k = 0; k < 4; k++) cfg_src[r][c][k] = SRC_ZERO;
        for (int k = 0; k < 8; k++) begin cfg_out[r][c][k] = OUT_OFF; mout[r][c][k] = 0; end
        cfg_const[r][c] = 0; cfg_glb_hi[r][c] = 0; cfg_glb_src[r][c] = 0; cfg_glb_en[r][c] = 0;
        my[r][c] = 0;
      end
    end
    for (int k = 0; k < L; k++) for (int i = 0; i < NL; i++) mhist[k][i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cfg = 0; cfg < 12; cfg++) begin
      // new configuration; the array and the model keep running through it
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          for (int k = 0; k < 4; k++) begin
            cfg_src[r][c][k] = src_e'($urandom_range(0, 10));
            if (cfg_src[r][c][k] <= SRC_NW) n_mesh++;
            if (cfg_src[r][c][k] == SRC_W && c == 0) n_ext++;
          end
          for (int k = 0; k < 8; k++) cfg_out[r][c][k] = out_e'($urandom_range(0, 2));
          cfg_const[r][c]   = 4'($urandom);
          cfg_glb_hi[r][c]  = 1'($urandom);
          cfg_glb_src[r][c] = 4'($urandom);
          cfg_glb_en[r][c]  = 1'($urandom);
          if (cfg_glb_en[r][c]) n_lat[meet(int'(cfg_glb_src[r][c]), leaf(r, c))]++;
        end
      for (int t = 0; t < 60; t++) begin
        for (int r = 0; r < R; r++) ext_in[r] = 4'($urandom);
        #1;
        model_step();
        @(posedge clk); #1;
        for (int r = 0; r < R; r++) begin
          checks++;
          if (ext_out[r] !== mout[r][C-1][2]) begin failures++; $display("FAIL ext_out %0d", r); end
          for (int c = 0; c < C; c++) begin
            checks++;
            if (cell_y[r][c] !== my[r][c]) begin
              failures++;
              if (failures < 10) $display("FAIL cfg %0d t %0d cell (%0d,%0d) got %h want %h", cfg, t, r, c, cell_y[r][c], my[r][c]);
            end
          end
        end
      end
    end
    checks += 2;
    if (n_mesh == 0) begin failures++; $display("FAIL no mesh hop used"); end
    if (n_ext == 0) begin failures++; $display("FAIL no edge input used"); end
    for (int l = 1; l <= L; l++) begin
      checks++;
      if (n_lat[l] == 0) begin failures++; $display("FAIL no tree route of latency %0d", l); end
    end
    $display("mesh hops %0d, edge inputs %0d, tree routes by latency %0d %0d %0d %0d",
             n_mesh, n_ext, n_lat[1], n_lat[2], n_lat[3], n_lat[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
