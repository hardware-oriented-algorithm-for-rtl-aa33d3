// tb_tan_frac_sweep: angle match rate against the number of fraction bits.
//
// Eight angle units with 0..7 fraction bits in the tangent table receive
// all 261,121 gradients (fx, fy in -255..255). Each result is compared with
// floor(atan2(fy, fx) / 10 deg); the match rate and the largest error in
// directions are printed per width. Expected shape, from the published
// evaluation of this method: about 47 % at 0 bits rising to about 99 % at
// 6 and 7 bits, and a largest error of one direction from 1 bit on. Checks:
// each rate within 5 points of 46.7, 57.6, 79.5, 90.1, 96.0, 97.1, 98.7,
// 98.8 %, the largest error (2 at 0 bits allowed, else 1), every result
// arriving after 6 clocks.
module tb_tan_frac_sweep;
  import gmm_pkg::*;

  localparam int N = 511 * 511;
  localparam real PUB [8] = '{46.7, 57.6, 79.5, 90.1, 96.0, 97.1, 98.7, 98.8};

  logic clk = 0, rst = 1;
  logic in_valid;
  logic signed [GRAD_W-1:0] fx, fy;
  logic [19:0] in_side;
  logic out_valid [8];
  logic [DIR_W-1:0] dir [8];
  logic [19:0] out_side [8];

  int checks = 0, failures = 0;
  int tdir [N];
  int n_match [8], max_err [8], n_seen [8];
  int cycle = 0;
  int in_cycle [N];

  for (genvar f = 0; f < 8; f++) begin : g_f
    tan_angle #(.FRAC_BITS(f), .SIDE_W(20)) dut (
      .clk, .rst, .in_valid, .fx, .fy, .in_side,
      .out_valid(out_valid[f]), .dir(dir[f]), .out_side(out_side[f]));
  end

  always #5 clk = ~clk;

  function automatic int true_dir(int gx, int gy);
    real t;
    t = $atan2(real'(gy), real'(gx)) * 180.0 / 3.14159265358979;
    if (t < 0.0) t += 360.0;
    return int'($floor(t / 10.0)) % 36;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && in_valid) in_cycle[int'(in_side)] = cycle;
    if (!rst)
      for (int f = 0; f < 8; f++)
        if (out_valid[f]) begin
          int i, e;
          i = int'(out_side[f]);
          if (cycle - in_cycle[i] != 6) begin
            failures++;
            if (failures < 5) $display("FAIL: latency %0d", cycle - in_cycle[i]);
          end
          n_seen[f]++;
          if (tdir[i] >= 0) begin
            e = int'(dir[f]) - tdir[i];
            if (e < 0) e = -e;
            if (e > 18) e = 36 - e;
            if (e == 0) n_match[f]++;
            if (e > max_err[f]) max_err[f] = e;
          end
        end
  end

  initial begin
    in_valid = 0; fx = 0; fy = 0; in_side = 0;
    for (int f = 0; f < 8; f++) begin n_match[f] = 0; max_err[f] = 0; n_seen[f] = 0; end
    for (int i = 0; i < N; i++)
      tdir[i] = (i / 511 == 255 && i % 511 == 255) ? -1 : true_dir(i / 511 - 255, i % 511 - 255);
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      in_valid <= 1;
      fx <= GRAD_W'(i / 511 - 255);
      fy <= GRAD_W'(i % 511 - 255);
      in_side <= 20'(i);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    for (int f = 0; f < 8; f++) begin
      real rate;
      rate = 100.0 * real'(n_match[f]) / real'(N - 1);
      $display("fraction bits %0d: match %0.2f %% (published %0.1f %%), largest error %0d",
               f, rate, PUB[f], max_err[f]);
      checks++;
      if (n_seen[f] != N) failures++;
      checks++;
      if (rate < PUB[f] - 5.0 || rate > PUB[f] + 5.0) failures++;
      checks++;
      if (max_err[f] > (f == 0 ? 2 : 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
