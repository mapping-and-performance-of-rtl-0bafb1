// tb_mg_local_xbar: self-checking test of one cell's local crossbar.
// Random configurations: each operand must follow the selected neighbour bus,
// the global digit, the constant or zero (combinationally); each outgoing bus
// must carry the selected digit of the cell result one clock later (the
// pipeline latch of the mesh).
module tb_mg_local_xbar;
  import mg_pkg::*;
  logic       clk = 0, rst_n = 0;
  src_e       cfg_src [4];
  digit_t     cfg_const;
  out_e       cfg_out [8];
  digit_t     nbr_in [8];
  digit_t     glb_in;
  logic [7:0] cell_y;
  digit_t     cell_in [4];
  digit_t     nbr_out [8];
  int checks = 0, failures = 0;

  mg_local_xbar dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic digit_t want_in(input int k);
    case (cfg_src[k])
      SRC_GLB:   return glb_in;
      SRC_CONST: return cfg_const;
      SRC_ZERO:  return 4'd0;
      default:   return nbr_in[int'(cfg_src[k]) % 8];
    endcase
  endfunction

  initial begin
    digit_t exp_out [8];
    for (int k = 0; k < 4; k++) cfg_src[k] = SRC_ZERO;
    for (int k = 0; k < 8; k++) begin cfg_out[k] = OUT_OFF; nbr_in[k] = '0; end
    cfg_const = 0; glb_in = 0; cell_y = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 500; it++) begin
      for (int k = 0; k < 4; k++) cfg_src[k] = src_e'($urandom_range(0, 10));
      for (int k = 0; k < 8; k++) begin
        cfg_out[k] = out_e'($urandom_range(0, 2));
        nbr_in[k]  = 4'($urandom);
      end
      cfg_const = 4'($urandom); glb_in = 4'($urandom); cell_y = 8'($urandom);
      for (int k = 0; k < 8; k++)
        exp_out[k] = (cfg_out[k] == OUT_LO) ? cell_y[3:0] : (cfg_out[k] == OUT_HI) ? cell_y[7:4] : 4'd0;
      #1;
      for (int k = 0; k < 4; k++)
        if (cell_in[k] !== want_in(k)) begin
          failures++; $display("FAIL operand %0d src %0d", k, cfg_src[k]);
        end
      checks++;
      @(posedge clk); #1;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (nbr_out[k] !== exp_out[k]) begin
          failures++; $display("FAIL out %0d got %h want %h", k, nbr_out[k], exp_out[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
