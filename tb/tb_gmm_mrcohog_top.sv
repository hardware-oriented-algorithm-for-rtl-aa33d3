// tb_gmm_mrcohog_top: end-to-end test of the human recognition circuit at
// its default size (32x64 images, 3,024 features, 3,024-1-2 network).
//
// A behavioural reference computes, from the image alone, the 1/2 and 1/4
// reductions, the central differences, the tangent-table directions, the 14
// kinds of co-occurrence pairs, the rectangular-mixture responsibilities,
// the 3,024 features and the network. Random component tables and weights
// are loaded first. Five images (noise, ramps, a bright figure) are streamed
// back to back with pix_valid held high, so the circuit must stall the
// source while it drains and classifies; image 3 arrives with random idle
// clocks from the source. For each image the test compares
// all features, the hidden sum and the class, and, for the images without
// gaps, the 2,085 clocks from the first pixel to the result (the published
// circuit needs 4,400). The hidden threshold is placed just at or just
// above the reference sum so that both classes occur.
// Mechanisms counted: source stalls, source gaps, every pair type, overlapping
// components, zero-responsibility pairs, 14 network chunks, both classes.
module tb_gmm_mrcohog_top;
  import gmm_pkg::*;

  localparam int N_IMG = 5;
  localparam int TAB [1:8] = '{11, 23, 37, 54, 76, 111, 176, 363};
  localparam int LIMIT = 4400;   // 0.044 ms at 100 MHz

  logic clk = 0, rst = 1;
  logic pix_valid, pix_ready;
  logic [PIX_W-1:0] pix;
  logic cfg_we;
  logic [PAIR_IDX_W-1:0] cfg_pair;
  logic [MIX_IDX_W-1:0] cfg_k;
  gauss_t cfg_g;
  logic w_we, w_hid;
  logic [PAIR_IDX_W-1:0] w_step;
  logic [CHUNK-1:0] w_data;
  logic [HIST_W-1:0] th_in;
  logic [11:0] th_hid;
  logic v_out [2];
  logic signed [7:0] b_out [2];
  logic res_valid, res_human;
  logic [11:0] res_hid_sum;

  gmm_mrcohog_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // model state
  int g_ca [N_PAIR][N_MIX], g_cb [N_PAIR][N_MIX], g_wa [N_PAIR][N_MIX], g_wb [N_PAIR][N_MIX];
  bit wbit [N_FEAT];
  int img [N_IMG][IMG_H][IMG_W];
  int lv [N_RES][IMG_H][IMG_W];
  int dm [N_RES][IMG_H][IMG_W];
  int feat [N_IMG][N_FEAT];
  int ref_sum [N_IMG];
  int th_hid_img [N_IMG];
  bit ref_human [N_IMG];

  // mechanism counters
  int n_chunks = 0, n_gap = 0;
  int n_stall = 0, n_overlap = 0, n_zero = 0, n_human = 0, n_not = 0, n_busy = 0;
  int n_pair [N_PAIR];

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  function automatic int ref_dir(int gx, int gy);
    int ax, ay, d;
    real theta;
    ax = iabs(gx); ay = iabs(gy);
    d = 0;
    for (int k = 1; k <= 8; k++) if (ay * 64 >= ax * TAB[k]) d = k;
    theta = d * 10.0 + 5.0;
    if (gx <= 0 && gy > 0)      theta = 180.0 - theta;   // [90, 180)
    else if (gx < 0 && gy <= 0) theta = 180.0 + theta;   // [180, 270)
    else if (gx >= 0 && gy < 0) theta = 360.0 - theta;   // [270, 360)
    return int'($floor(theta / 10.0));
  endfunction

  function automatic int ref_cell(int xf, int yf);
    return int'($floor(real'(yf) * 9.0 / 64.0)) * 4 + xf / 8;
  endfunction

  task automatic add_pair(int i, int p, int a, int b, int c);
    int n;
    bit hold [N_MIX];
    n = 0;
    for (int k = 0; k < N_MIX; k++) begin
      hold[k] = iabs(a - g_ca[p][k]) < (1 << g_wa[p][k]) && iabs(b - g_cb[p][k]) < (1 << g_wb[p][k]);
      n += hold[k];
    end
    if (n > 1) n_overlap++;
    if (n == 0) n_zero++;
    for (int k = 0; k < N_MIX; k++)
      if (hold[k]) feat[i][p * CHUNK + c * N_MIX + k] += 240 / n;
  endtask

  task automatic reference(int i);
    int nbx [4] = '{1, -1, 0, 1};
    int nby [4] = '{0, 1, 1, 1};
    int s;
    for (int f = 0; f < N_FEAT; f++) feat[i][f] = 0;
    for (int y = 0; y < IMG_H; y++) for (int x = 0; x < IMG_W; x++) lv[0][y][x] = img[i][y][x];
    for (int l = 1; l < N_RES; l++)
      for (int y = 0; y < (IMG_H >> l); y++)
        for (int x = 0; x < (IMG_W >> l); x++)
          lv[l][y][x] = (lv[l-1][2*y][2*x] + lv[l-1][2*y][2*x+1] +
                         lv[l-1][2*y+1][2*x] + lv[l-1][2*y+1][2*x+1] + 2) / 4;
    for (int l = 0; l < N_RES; l++)
      for (int y = 1; y < (IMG_H >> l) - 1; y++)
        for (int x = 1; x < (IMG_W >> l) - 1; x++)
          dm[l][y][x] = ref_dir(lv[l][y][x+1] - lv[l][y][x-1], lv[l][y+1][x] - lv[l][y-1][x]);
    for (int l = 0; l < N_RES; l++)
      for (int yc = 1; yc <= (IMG_H >> l) - 3; yc++)
        for (int xc = 2; xc <= (IMG_W >> l) - 3; xc++)
          for (int o = 0; o < 4; o++)
            add_pair(i, l*4 + o, dm[l][yc][xc], dm[l][yc+nby[o]][xc+nbx[o]], ref_cell(xc << l, yc << l));
    for (int l = 0; l < N_RES - 1; l++)
      for (int y = 1; y <= (IMG_H >> (l+1)) - 2; y++)
        for (int x = 1; x <= (IMG_W >> (l+1)) - 2; x++)
          add_pair(i, 12 + l, dm[l][2*y][2*x], dm[l+1][y][x], ref_cell(x << (l+1), y << (l+1)));
    s = 0;
    for (int f = 0; f < N_FEAT; f++) s += ((feat[i][f] >= int'(th_in)) == wbit[f]);
    ref_sum[i] = s;
    th_hid_img[i] = (i % 2 == 0) ? s : s + 1;      // even images: human
    ref_human[i] = (i % 2 == 0);
  endtask

  // results
  int img_out = 0;
  int first_pix_cyc [N_IMG];
  int n_acc = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (pix_valid && !pix_ready) n_stall++;
      if (pix_valid && pix_ready) begin
        if (n_acc % (IMG_W * IMG_H) == 0) first_pix_cyc[n_acc / (IMG_W * IMG_H)] = cyc;
        n_acc++;
      end
      for (int p = 0; p < N_PAIR; p++) if (dut.pairs[p].valid) n_pair[p]++;
      if (dut.u_bnn.busy) n_busy++;
      if (res_valid) begin
        int i, bad, lat;
        i = img_out;
        bad = 0;
        for (int p = 0; p < N_PAIR; p++)
          for (int c = 0; c < N_CELL; c++)
            for (int k = 0; k < N_MIX; k++)
              if (int'(dut.u_hist.bank_q[p][k][c]) != feat[i][p * CHUNK + c * N_MIX + k]) bad++;
        checks++;
        if (bad != 0) begin failures++; $display("FAIL: image %0d: %0d features differ", i, bad); end
        checks++;
        if (int'(res_hid_sum) != ref_sum[i] || res_human != ref_human[i]) begin
          failures++;
          $display("FAIL: image %0d hidden sum %0d/%0d human %0d/%0d", i, res_hid_sum, ref_sum[i], res_human, ref_human[i]);
        end
        lat = cyc - first_pix_cyc[i];
        $display("image %0d: hidden sum %0d, human %0d, %0d clocks from first pixel to result", i, res_hid_sum, res_human, lat);
        checks++;
        if (i != 3 && lat != 2085) begin failures++; $display("FAIL: %0d clocks, expected 2085", lat); end
        if (lat > LIMIT && i != 3) begin failures++; $display("FAIL: %0d clocks exceed %0d", lat, LIMIT); end
        if (res_human) n_human++; else n_not++;
        img_out++;
      end
    end
  end

  // hidden threshold of the image being classified
  always_comb th_hid = 12'(th_hid_img[img_out < N_IMG ? img_out : N_IMG - 1]);

  initial begin
    pix_valid = 0; pix = 0; cfg_we = 0; cfg_pair = 0; cfg_k = 0; cfg_g = '0;
    w_we = 0; w_hid = 0; w_step = 0; w_data = '0;
    th_in = 16'd480; v_out[0] = 0; v_out[1] = 1; b_out[0] = 0; b_out[1] = 0;
    for (int p = 0; p < N_PAIR; p++) n_pair[p] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // component tables
    for (int p = 0; p < N_PAIR; p++)
      for (int k = 0; k < N_MIX; k++) begin
        g_ca[p][k] = $urandom_range(0, 35); g_cb[p][k] = $urandom_range(0, 35);
        g_wa[p][k] = $urandom_range(1, 3);  g_wb[p][k] = $urandom_range(1, 3);
        cfg_we <= 1; cfg_pair <= PAIR_IDX_W'(p); cfg_k <= MIX_IDX_W'(k);
        cfg_g <= '{ca: DIR_W'(g_ca[p][k]), cb: DIR_W'(g_cb[p][k]), wa: 3'(g_wa[p][k]), wb: 3'(g_wb[p][k])};
        @(posedge clk);
      end
    cfg_we <= 0;
    // network weights
    for (int f = 0; f < N_FEAT; f++) wbit[f] = $urandom_range(0, 1);
    for (int s = 0; s < N_STEP; s++) begin
      logic [CHUNK-1:0] d;
      for (int i = 0; i < CHUNK; i++) d[i] = wbit[s * CHUNK + i];
      w_we <= 1; w_hid <= 0; w_step <= PAIR_IDX_W'(s); w_data <= d;
      @(posedge clk);
    end
    w_we <= 0;
    // images
    for (int i = 0; i < N_IMG; i++)
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < IMG_W; x++)
          case (i % 3)
            0: img[i][y][x] = $urandom_range(0, 255);
            1: img[i][y][x] = (x * 7 + y * 3 + $urandom_range(0, 40)) % 256;
            default: img[i][y][x] = (iabs(x - 16) < 6 && y > 8 && y < 60) ? 200 + $urandom_range(0, 30)
                                                                           : 40 + $urandom_range(0, 30);
          endcase
    for (int i = 0; i < N_IMG; i++) reference(i);
    // stream, back to back
    for (int i = 0; i < N_IMG; i++)
      for (int y = 0; y < IMG_H; y++)
        for (int x = 0; x < IMG_W; x++) begin
          // image 3 comes with random idle clocks from the source
          while (i == 3 && $urandom_range(0, 7) == 0) begin
            pix_valid <= 0;
            n_gap++;
            @(posedge clk);
          end
          pix_valid <= 1;
          pix <= PIX_W'(img[i][y][x]);
          @(posedge clk);
          while (!pix_ready) @(posedge clk);
        end
    pix_valid <= 0;
    while (img_out < N_IMG) @(posedge clk);
    repeat (3) @(posedge clk);
    n_chunks = n_busy / (N_STEP + 2) * N_STEP;   // busy: 14 chunk clocks + 2
    $display("stalls %0d overlaps %0d empty %0d chunks %0d human %0d not %0d",
             n_stall, n_overlap, n_zero, n_chunks, n_human, n_not);
    checks++; if (n_gap == 0) begin failures++; $display("FAIL: no source gap"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL: no stall"); end
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL: no overlap"); end
    checks++; if (n_zero == 0) begin failures++; $display("FAIL: no empty pair"); end
    checks++; if (n_busy != N_IMG * (N_STEP + 2)) begin failures++; $display("FAIL: %0d chunks", n_chunks); end
    checks++; if (n_human == 0 || n_not == 0) begin failures++; $display("FAIL: one class missing"); end
    for (int p = 0; p < N_PAIR; p++) begin
      checks++;
      if (n_pair[p] == 0) begin failures++; $display("FAIL: pair type %0d never formed", p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_IMG * 2300 + 2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
