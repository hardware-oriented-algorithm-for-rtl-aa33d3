// tb_gmm_resp: loads random component tables (including writes for other
// pair types, which must be ignored) and checks the responsibilities of
// random pairs: a component holds the pair when |a-ca| < 2^wa and
// |b-cb| < 2^wb, and each of the n holding components gets 240/n. Also
// checks the cell passed along, one clock of latency, and that a pair that
// no component holds gives all zeros.
module tb_gmm_resp;
  import gmm_pkg::*;
  localparam int ID = 5;

  logic clk = 0, rst = 1;
  logic cfg_we;
  logic [PAIR_IDX_W-1:0] cfg_pair;
  logic [MIX_IDX_W-1:0] cfg_k;
  gauss_t cfg_g;
  pair_t in_pair;
  resp_t out_resp;
  int checks = 0, failures = 0;
  int ca [N_MIX], cb [N_MIX], wa [N_MIX], wb [N_MIX];
  int exp_r [N_MIX];
  int exp_cell;
  logic exp_valid;
  int n_zero = 0, n_multi = 0;

  gmm_resp #(.PAIR_ID(ID)) dut (.*);

  always #5 clk = ~clk;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  task automatic load_table();
    for (int k = 0; k < N_MIX; k++) begin
      ca[k] = $urandom_range(0, 35); cb[k] = $urandom_range(0, 35);
      wa[k] = $urandom_range(0, 4);  wb[k] = $urandom_range(0, 4);
      cfg_we <= 1; cfg_pair <= ID; cfg_k <= MIX_IDX_W'(k);
      cfg_g <= '{ca: DIR_W'(ca[k]), cb: DIR_W'(cb[k]), wa: 3'(wa[k]), wb: 3'(wb[k])};
      @(posedge clk);
      // a write to another pair type must not land here
      cfg_pair <= ID + 1;
      cfg_g <= '{ca: 6'd0, cb: 6'd0, wa: 3'd7, wb: 3'd7};
      @(posedge clk);
    end
    cfg_we <= 0;
  endtask

  initial begin
    cfg_we = 0; cfg_pair = 0; cfg_k = 0; cfg_g = '0; in_pair = '0; exp_valid = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int t = 0; t < 20; t++) begin
      load_table();
      for (int i = 0; i < 200; i++) begin
        int a, b, n;
        bit hold [N_MIX];
        a = $urandom_range(0, 35); b = $urandom_range(0, 35);
        if (i % 7 == 0) begin a = ca[i % N_MIX]; b = cb[i % N_MIX]; end
        n = 0;
        for (int k = 0; k < N_MIX; k++) begin
          hold[k] = iabs(a - ca[k]) < (1 << wa[k]) && iabs(b - cb[k]) < (1 << wb[k]);
          n += hold[k];
        end
        in_pair <= '{valid: 1'b1, a: DIR_W'(a), b: DIR_W'(b), cell_id: CELL_W'($urandom_range(0, 35))};
        @(posedge clk);
        exp_valid <= 1;
        exp_cell  <= int'(in_pair.cell_id);
        for (int k = 0; k < N_MIX; k++) exp_r[k] <= hold[k] ? 240 / n : 0;
        if (n == 0) n_zero++;
        if (n > 1) n_multi++;
      end
      in_pair.valid <= 0;
      @(posedge clk);
      exp_valid <= 0;
    end
    @(posedge clk);
    checks++;
    if (n_zero == 0 || n_multi == 0) begin failures++; $display("FAIL: cases not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && exp_valid) begin
      bit bad;
      bad = !out_resp.valid || int'(out_resp.cell_id) != exp_cell;
      for (int k = 0; k < N_MIX; k++) if (int'(out_resp.r[k]) != exp_r[k]) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL: r0 %0d/%0d r1 %0d/%0d", out_resp.r[0], exp_r[0], out_resp.r[1], exp_r[1]);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
