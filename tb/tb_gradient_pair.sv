// tb_gradient_pair: drives the three direction streams with random maps on
// the same schedule the pixel pipeline produces (a full-resolution gradient
// per pixel clock, a 1/2-resolution one on odd pixels of odd rows, a
// 1/4-resolution one on every fourth of those), for two images with idle
// clocks. Each of the 14 pair ports must deliver, in raster order of its
// pairs, the expected direction pair and cell; the number of pairs per port
// is checked at the end.
module tb_gradient_pair;
  import gmm_pkg::*;

  logic clk = 0, rst = 1;
  logic             g_valid [N_RES];
  logic [DIR_W-1:0] g_dir   [N_RES];
  logic [4:0]       g_x     [N_RES];
  logic [5:0]       g_y     [N_RES];
  pair_t            pairs   [N_PAIR];
  int checks = 0, failures = 0;
  int dmap [2][N_RES][IMG_H][IMG_W];
  int exp_a [N_PAIR][$], exp_b [N_PAIR][$], exp_c [N_PAIR][$];
  int got [N_PAIR];

  gradient_pair #(.XW(5), .YW(6)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_cell(int xf, int yf);
    return int'($floor(real'(yf) * 9.0 / 64.0)) * 4 + xf / 8;
  endfunction

  task automatic build_expected(int f);
    int nbx [4] = '{1, -1, 0, 1};
    int nby [4] = '{0, 1, 1, 1};
    for (int l = 0; l < N_RES; l++) begin
      int w, h;
      w = IMG_W >> l; h = IMG_H >> l;
      for (int yc = 1; yc <= h - 3; yc++)
        for (int xc = 2; xc <= w - 3; xc++)
          for (int o = 0; o < 4; o++) begin
            exp_a[l*4+o].push_back(dmap[f][l][yc][xc]);
            exp_b[l*4+o].push_back(dmap[f][l][yc+nby[o]][xc+nbx[o]]);
            exp_c[l*4+o].push_back(ref_cell(xc << l, yc << l));
          end
    end
    for (int l = 0; l < N_RES - 1; l++) begin
      int w, h;
      w = IMG_W >> (l + 1); h = IMG_H >> (l + 1);
      for (int y = 1; y <= h - 2; y++)
        for (int x = 1; x <= w - 2; x++) begin
          exp_a[12+l].push_back(dmap[f][l][2*y][2*x]);
          exp_b[12+l].push_back(dmap[f][l+1][y][x]);
          exp_c[12+l].push_back(ref_cell(x << (l + 1), y << (l + 1)));
        end
    end
  endtask

  always @(posedge clk) begin
    if (!rst)
      for (int p = 0; p < N_PAIR; p++)
        if (pairs[p].valid) begin
          checks++;
          if (got[p] >= exp_a[p].size() ||
              int'(pairs[p].a) != exp_a[p][got[p]] || int'(pairs[p].b) != exp_b[p][got[p]] ||
              int'(pairs[p].cell_id) != exp_c[p][got[p]]) begin
            failures++;
            if (failures < 10) $display("FAIL: port %0d pair %0d", p, got[p]);
          end
          got[p]++;
        end
  end

  initial begin
    for (int l = 0; l < N_RES; l++) begin g_valid[l] = 0; g_dir[l] = 0; g_x[l] = 0; g_y[l] = 0; end
    for (int p = 0; p < N_PAIR; p++) got[p] = 0;
    for (int f = 0; f < 2; f++) begin
      for (int l = 0; l < N_RES; l++)
        for (int y = 0; y < IMG_H; y++)
          for (int x = 0; x < IMG_W; x++) dmap[f][l][y][x] = $urandom_range(0, 35);
      build_expected(f);
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < IMG_W; x++) begin
          int X, Y, X2, Y2;
          while ($urandom_range(0, 4) == 0) begin
            for (int l = 0; l < N_RES; l++) g_valid[l] <= 0;
            @(posedge clk);
          end
          for (int l = 0; l < N_RES; l++) g_valid[l] <= 0;
          if (x >= 2 && y >= 2) begin
            g_valid[0] <= 1; g_dir[0] <= DIR_W'(dmap[f][0][y-1][x-1]);
            g_x[0] <= 5'(x - 1); g_y[0] <= 6'(y - 1);
          end
          X = x / 2; Y = y / 2;
          if (x % 2 == 1 && y % 2 == 1 && X >= 2 && Y >= 2) begin
            g_valid[1] <= 1; g_dir[1] <= DIR_W'(dmap[f][1][Y-1][X-1]);
            g_x[1] <= 5'(X - 1); g_y[1] <= 6'(Y - 1);
          end
          X2 = X / 2; Y2 = Y / 2;
          if (x % 2 == 1 && y % 2 == 1 && X % 2 == 1 && Y % 2 == 1 && X2 >= 2 && Y2 >= 2) begin
            g_valid[2] <= 1; g_dir[2] <= DIR_W'(dmap[f][2][Y2-1][X2-1]);
            g_x[2] <= 5'(X2 - 1); g_y[2] <= 6'(Y2 - 1);
          end
          @(posedge clk);
        end
    for (int l = 0; l < N_RES; l++) g_valid[l] <= 0;
    repeat (5) @(posedge clk);
    for (int p = 0; p < N_PAIR; p++) begin
      checks++;
      if (got[p] != exp_a[p].size()) begin
        failures++;
        $display("FAIL: port %0d gave %0d pairs, expected %0d", p, got[p], exp_a[p].size());
      end
    end
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
