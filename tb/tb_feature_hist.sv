// tb_feature_hist: random bursts of updates on all 14 ports at once, with
// a shadow model of the 3,024 features; after each burst every chunk read
// through rd_step is compared with the model, then the memory is cleared
// (also while updates arrive) and must read back all zeros.
module tb_feature_hist;
  import gmm_pkg::*;

  logic clk = 0, clear = 1;
  resp_t upd [N_PAIR];
  logic [PAIR_IDX_W-1:0] rd_step;
  logic [HIST_W-1:0] rd_data [CHUNK];
  int checks = 0, failures = 0;
  int model [N_PAIR][CHUNK];

  feature_hist dut (.*);

  always #5 clk = ~clk;

  task automatic compare_all();
    for (int s = 0; s < N_PAIR; s++) begin
      bit bad;
      rd_step = PAIR_IDX_W'(s);
      #1;
      bad = 0;
      for (int i = 0; i < CHUNK; i++) if (int'(rd_data[i]) != model[s][i]) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL: chunk %0d differs", s);
      end
    end
  endtask

  initial begin
    rd_step = 0;
    for (int p = 0; p < N_PAIR; p++) upd[p] = '0;
    for (int p = 0; p < N_PAIR; p++) for (int i = 0; i < CHUNK; i++) model[p][i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) clear = 0;
    for (int round = 0; round < 4; round++) begin
      for (int t = 0; t < 300; t++) begin
        @(negedge clk);
        for (int p = 0; p < N_PAIR; p++) begin
          upd[p].valid = ($urandom_range(0, 2) != 0);
          upd[p].cell_id = CELL_W'($urandom_range(0, N_CELL - 1));
          for (int k = 0; k < N_MIX; k++) upd[p].r[k] = RESP_W'($urandom_range(0, 240));
          if (upd[p].valid)
            for (int k = 0; k < N_MIX; k++)
              model[p][int'(upd[p].cell_id) * N_MIX + k] += int'(upd[p].r[k]);
        end
      end
      @(negedge clk);
      for (int p = 0; p < N_PAIR; p++) upd[p].valid = 0;
      compare_all();
      // clear wins over a simultaneous update
      @(negedge clk);
      clear = 1;
      for (int p = 0; p < N_PAIR; p++) upd[p].valid = 1;
      @(negedge clk);
      clear = 0;
      for (int p = 0; p < N_PAIR; p++) upd[p].valid = 0;
      for (int p = 0; p < N_PAIR; p++) for (int i = 0; i < CHUNK; i++) model[p][i] = 0;
      compare_all();
    end
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
