// tb_tan_angle: exhaustive test of the tangent-table angle unit.
//
// Every gradient (fx, fy) in -255..255 x -255..255 (261,121 values) is fed,
// with random idle clocks between some of them. Each result is checked
// against a reference written from the tabulated 6-fraction-bit tangents
// (11, 23, 37, 54, 76, 111, 176, 363 = round(64 tan 10k deg)) and a sector
// fold expressed in degrees, and the latency must be exactly 6 clocks. The
// test also compares with the exact angle floor(atan2(fy, fx) / 10 deg) and
// requires a match rate of at least 98 % and a largest error of one
// direction, as expected for 6 fraction bits.
module tb_tan_angle;
  import gmm_pkg::*;

  localparam int N = 511 * 511;
  localparam int TAB [1:8] = '{11, 23, 37, 54, 76, 111, 176, 363};

  logic clk = 0, rst = 1;
  logic in_valid;
  logic signed [GRAD_W-1:0] fx, fy;
  logic [19:0] in_side, out_side;
  logic out_valid;
  logic [DIR_W-1:0] dir;

  int checks = 0, failures = 0;
  int exp_dir [N];
  int in_cycle [N];
  int cycle = 0;
  int n_match = 0, max_err = 0, compared = 0;
  int n_out = 0;

  tan_angle #(.FRAC_BITS(6), .SIDE_W(20)) dut (
    .clk, .rst, .in_valid, .fx, .fy, .in_side, .out_valid, .dir, .out_side);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int ref_dir(int gx, int gy);
    int ax, ay, d;
    real theta;
    ax = gx < 0 ? -gx : gx;
    ay = gy < 0 ? -gy : gy;
    d = 0;
    for (int k = 1; k <= 8; k++) if (ay * 64 >= ax * TAB[k]) d = k;
    theta = d * 10.0 + 5.0;                       // middle of the sector
    if (gx <= 0 && gy > 0)      theta = 180.0 - theta;   // [90, 180)
    else if (gx < 0 && gy <= 0) theta = 180.0 + theta;   // [180, 270)
    else if (gx >= 0 && gy < 0) theta = 360.0 - theta;   // [270, 360)
    return int'($floor(theta / 10.0));
  endfunction

  function automatic int true_dir(int gx, int gy);
    real t;
    t = $atan2(real'(gy), real'(gx)) * 180.0 / 3.14159265358979;
    if (t < 0.0) t += 360.0;
    return int'($floor(t / 10.0)) % 36;
  endfunction

  initial begin
    in_valid = 0; fx = 0; fy = 0; in_side = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      int gx, gy;
      gx = i / 511 - 255;
      gy = i % 511 - 255;
      exp_dir[i] = ref_dir(gx, gy);
      if (gx != 0 || gy != 0) begin
        int e;
        e = exp_dir[i] - true_dir(gx, gy);
        if (e < 0) e = -e;
        if (e > 18) e = 36 - e;
        if (e == 0) n_match++;
        if (e > max_err) max_err = e;
        compared++;
      end
      while ($urandom_range(0, 15) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
      in_valid <= 1;
      fx <= GRAD_W'(gx);
      fy <= GRAD_W'(gy);
      in_side <= 20'(i);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != N) begin failures++; $display("FAIL: %0d results for %0d inputs", n_out, N); end
    $display("match rate against atan2: %0d / %0d = %f, largest error %0d",
             n_match, compared, real'(n_match) / real'(compared), max_err);
    checks++;
    if (real'(n_match) / real'(compared) < 0.98) failures++;
    checks++;
    if (max_err > 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && in_valid) in_cycle[int'(in_side)] = cycle;
    if (!rst && out_valid) begin
      int i;
      i = int'(out_side);
      n_out++;
      checks++;
      if (int'(dir) != exp_dir[i] || cycle - in_cycle[i] != 6) begin
        failures++;
        if (failures < 10)
          $display("FAIL: input %0d dir %0d expected %0d, latency %0d",
                   i, dir, exp_dir[i], cycle - in_cycle[i]);
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
