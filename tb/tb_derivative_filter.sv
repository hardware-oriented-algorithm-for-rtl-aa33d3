// tb_derivative_filter: random and extreme 3x3 windows; checks
// fx = right - left, fy = bottom - top of the centre row / column, the
// coordinates passed along, and one clock of latency.
module tb_derivative_filter;
  import gmm_pkg::*;

  logic clk = 0, rst = 1;
  logic in_valid;
  logic [PIX_W-1:0] win [3][3];
  logic [4:0] in_x, out_x;
  logic [5:0] in_y, out_y;
  logic out_valid;
  logic signed [GRAD_W-1:0] fx, fy;
  int checks = 0, failures = 0;
  int ex, ey, ecx, ecy;
  logic exp_valid;

  derivative_filter #(.XW(5), .YW(6)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    in_valid = 0; exp_valid = 0;
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = 0;
    in_x = 0; in_y = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < 2000; i++) begin
      logic [PIX_W-1:0] w [3][3];
      bit v;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++)
        w[r][c] = (i < 4) ? ((i[0] ^ (c == 2) ^ (r == 2)) ? 8'd255 : 8'd0) : PIX_W'($urandom);
      v = $urandom_range(0, 4) != 0;
      in_valid <= v;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] <= w[r][c];
      in_x <= 5'($urandom); in_y <= 6'($urandom);
      @(posedge clk);
      // values registered at this edge appear now; compare next edge
      exp_valid <= v;
      ex  <= int'(w[1][2]) - int'(w[1][0]);
      ey  <= int'(w[2][1]) - int'(w[0][1]);
      ecx <= int'(in_x); ecy <= int'(in_y);
    end
    in_valid <= 0;
    @(posedge clk);
    exp_valid <= 0;
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (out_valid != exp_valid ||
          (exp_valid && (int'(fx) != ex || int'(fy) != ey || int'(out_x) != ecx || int'(out_y) != ecy))) begin
        failures++;
        if (failures < 10) $display("FAIL: fx %0d/%0d fy %0d/%0d valid %0d/%0d", fx, ex, fy, ey, out_valid, exp_valid);
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
