// tb_grad_line_buffer: streams two random 30x62 direction maps (the
// interior gradients of a 32x64 image) with idle clocks and checks every
// presented centre and its right, down-left, down and down-right
// neighbours against the map, the centre coordinates, the 28x61 centres
// per map in raster order, and one clock from the completing input.
module tb_grad_line_buffer;
  import gmm_pkg::*;
  localparam int W = 32, H = 64;

  logic clk = 0, rst = 1;
  logic in_valid;
  logic [DIR_W-1:0] in_dir;
  logic [4:0] in_x, out_x;
  logic [5:0] in_y, out_y;
  logic out_valid;
  logic [DIR_W-1:0] centre;
  logic [DIR_W-1:0] nb [N_INTRA];
  int checks = 0, failures = 0;
  int dmap [2][H][W];
  int n_out = 0;
  logic expect_out;
  localparam int PER = (W - 4) * (H - 3);

  grad_line_buffer #(.W(W), .XW(5), .YW(6)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst && (out_valid || expect_out)) begin
      int f, k, cx, cy;
      bit bad;
      f = n_out / PER; k = n_out % PER;
      cx = k % (W - 4) + 2; cy = k / (W - 4) + 1;
      bad = !out_valid || !expect_out || int'(out_x) != cx || int'(out_y) != cy ||
            int'(centre) != dmap[f][cy][cx]   || int'(nb[0]) != dmap[f][cy][cx+1] ||
            int'(nb[1]) != dmap[f][cy+1][cx-1] || int'(nb[2]) != dmap[f][cy+1][cx] ||
            int'(nb[3]) != dmap[f][cy+1][cx+1];
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL: centre %0d at (%0d,%0d) got (%0d,%0d)", n_out, cx, cy, out_x, out_y);
      end
      n_out++;
    end
  end

  initial begin
    in_valid = 0; in_dir = 0; in_x = 0; in_y = 0; expect_out = 0;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) dmap[f][y][x] = $urandom_range(0, 35);
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int f = 0; f < 2; f++)
      for (int y = 1; y < H - 1; y++)
        for (int x = 1; x < W - 1; x++) begin
          while ($urandom_range(0, 2) == 0) begin
            in_valid <= 0; @(posedge clk); expect_out <= 0;
          end
          in_valid <= 1;
          in_dir <= DIR_W'(dmap[f][y][x]);
          in_x <= 5'(x); in_y <= 6'(y);
          @(posedge clk);
          expect_out <= (x >= 3 && y >= 2);
        end
    in_valid <= 0;
    @(posedge clk);
    expect_out <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != 2 * PER) begin failures++; $display("FAIL: %0d centres", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
