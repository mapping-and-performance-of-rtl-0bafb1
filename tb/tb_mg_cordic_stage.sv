// tb_mg_cordic_stage: self-checking test of one CORDIC stage.
// Stages 0 and 5 are tested side by side with random 24-bit data, one sample
// per cycle. Outputs must follow the vectoring update for the sign of y
// exactly, 17 cycles after the inputs; both directions must occur.
module tb_mg_cordic_stage;
  import mg_pkg::*;
  localparam int LAT = 17;
  localparam int NOPS = 300;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic signed [23:0] x_in, y_in, z_in;
  logic               v0, v5;
  logic signed [23:0] x0, y0, z0, x5, y5, z5;
  logic signed [23:0] ox [NOPS], oy [NOPS], oz [NOPS];
  int checks = 0, failures = 0, npos = 0, nneg = 0;

  mg_cordic_stage #(.STAGE(0)) dut0 (.clk, .rst_n, .in_valid, .x_in, .y_in, .z_in,
    .out_valid(v0), .x_out(x0), .y_out(y0), .z_out(z0));
  mg_cordic_stage #(.STAGE(5)) dut5 (.clk, .rst_n, .in_valid, .x_in, .y_in, .z_in,
    .out_valid(v5), .x_out(x5), .y_out(y5), .z_out(z5));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int n, input int i, input logic v,
                           input logic signed [23:0] gx, gy, gz);
    longint x, y, z, ex, ey, ez, f;
    x = ox[n]; y = oy[n]; z = oz[n];
    f = (i == 0) ? 2097152 : 83416;      // atan(2^-i) * 2^23 / pi
    if (y >= 0) begin ex = x + (y >>> i); ey = y - (x >>> i); ez = z + f; end
    else        begin ex = x - (y >>> i); ey = y + (x >>> i); ez = z - f; end
    checks++;
    if (!v || gx != 24'(ex) || gy != 24'(ey) || gz != 24'(ez)) begin
      failures++; $display("FAIL stage %0d sample %0d", i, n);
    end
  endtask

  initial begin
    for (int n = 0; n < NOPS; n++) begin
      ox[n] = 24'($signed(22'($urandom)));
      oy[n] = 24'($signed(22'($urandom)));
      oz[n] = 24'($signed(22'($urandom)));
      if (oy[n] >= 0) npos++; else nneg++;
    end
    in_valid = 0; x_in = 0; y_in = 0; z_in = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < NOPS + LAT; t++) begin
      if (t < NOPS) begin in_valid = 1; x_in = ox[t]; y_in = oy[t]; z_in = oz[t]; end
      else in_valid = 0;
      @(posedge clk); #1;
      if (t - LAT + 1 >= 0 && t - LAT + 1 < NOPS) begin
        check_one(t - LAT + 1, 0, v0, x0, y0, z0);
        check_one(t - LAT + 1, 5, v5, x5, y5, z5);
      end else if (t - LAT + 1 < 0) begin
        checks++;
        if (v0) begin failures++; $display("FAIL early valid"); end
      end
    end
    checks++;
    if (npos == 0 || nneg == 0) begin failures++; $display("FAIL one direction never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
