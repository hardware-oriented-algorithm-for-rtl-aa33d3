// tb_bnn: runs the 3,024-1-2 network on random feature sets, weights and
// thresholds. The reference binarizes the features against th_in, counts
// the inputs that agree with the weights, applies the hidden threshold and
// the output layer. Checks the hidden sum, the class, that chunks are
// requested 0..13 on consecutive clocks, and that done is seen 17 clock
// edges after the edge that takes start. Both classes must occur.
module tb_bnn;
  import gmm_pkg::*;
  localparam int NS = N_FEAT / CHUNK;

  logic clk = 0, rst = 1;
  logic start, busy, done, human;
  logic [3:0] step;
  logic [HIST_W-1:0] chunk [CHUNK];
  logic [HIST_W-1:0] th_in;
  logic [11:0] th_hid [1];
  logic [0:0] v_out [2];
  logic signed [7:0] b_out [2];
  logic w_we;
  logic [0:0] w_hid;
  logic [3:0] w_step;
  logic [CHUNK-1:0] w_data;
  logic [11:0] hid_sum [1];
  int checks = 0, failures = 0;
  int feat [N_FEAT];
  bit wbit [N_FEAT];
  int n_human = 0, n_not = 0;
  int exp_step, cyc, start_cyc, done_cyc;

  // start is sampled at one edge, done is seen N_STEP + 3 edges later;
  // the chunk index must count 0..N_STEP-1 on the clocks in between
  always @(posedge clk) begin
    if (start) begin start_cyc = cyc; exp_step = 0; end
    if (done)  done_cyc = cyc;
    if (busy && cyc - start_cyc >= 1 && cyc - start_cyc <= NS) begin
      checks++;
      if (int'(step) != exp_step) failures++;
      exp_step++;
    end
  end

  bnn #(.N_IN(N_FEAT), .CH(CHUNK), .N_HID(1), .N_OUT(2), .CNT_W(12), .STEP_W(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // feature memory model: chunk follows the requested step
  always_comb for (int i = 0; i < CHUNK; i++) chunk[i] = HIST_W'(feat[int'(step) * CHUNK + i]);

  initial begin
    cyc = 0;
    start = 0; w_we = 0; w_hid = 0; w_step = 0; w_data = '0;
    th_in = 0; th_hid[0] = 0; v_out[0] = 0; v_out[1] = 1; b_out[0] = 0; b_out[1] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 40; t++) begin
      int s, e_sum, sc0, sc1;
      bit h, e_human;
      for (int i = 0; i < N_FEAT; i++) begin
        feat[i] = $urandom_range(0, 2000);
        wbit[i] = $urandom_range(0, 1);
      end
      for (int st = 0; st < NS; st++) begin
        logic [CHUNK-1:0] d;
        for (int i = 0; i < CHUNK; i++) d[i] = wbit[st * CHUNK + i];
        w_we <= 1; w_hid <= 0; w_step <= 4'(st); w_data <= d;
        @(posedge clk);
      end
      w_we <= 0;
      th_in <= HIST_W'($urandom_range(0, 2000));
      th_hid[0] <= 12'(1400 + $urandom_range(0, 200));
      v_out[0] <= 1'($urandom); v_out[1] <= 1'($urandom);
      b_out[0] <= 8'($signed($urandom_range(0, 4)) - 2); b_out[1] <= 8'($signed($urandom_range(0, 4)) - 2);
      @(posedge clk);
      e_sum = 0;
      for (int i = 0; i < N_FEAT; i++) e_sum += ((feat[i] >= int'(th_in)) == wbit[i]);
      h = e_sum >= int'(th_hid[0]);
      sc0 = int'(b_out[0]) + ((h == v_out[0][0]) ? 1 : -1);
      sc1 = int'(b_out[1]) + ((h == v_out[1][0]) ? 1 : -1);
      e_human = sc1 > sc0;
      start <= 1;
      @(posedge clk);
      start <= 0;
      exp_step = 0;
      s = 0;
      while (!done) begin
        @(posedge clk);
        if (++s > 100) break;
      end
      @(posedge clk);
      checks++;
      if (int'(hid_sum[0]) != e_sum || human != e_human || done_cyc - start_cyc != NS + 3 || exp_step != NS) begin
        failures++;
        $display("FAIL: run %0d sum %0d/%0d human %0d/%0d clocks %0d steps %0d",
                 t, hid_sum[0], e_sum, human, e_human, done_cyc - start_cyc, exp_step);
      end
      if (human) n_human++; else n_not++;
    end
    checks++;
    if (n_human == 0 || n_not == 0) begin failures++; $display("FAIL: one class never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
