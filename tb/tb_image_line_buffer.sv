// tb_image_line_buffer: streams two random 32x64 images with idle clocks
// and checks every 3x3 window (all nine pixels and the centre coordinates)
// against the image, the count of 30x62 windows per image, and that a
// window is presented one clock after its bottom-right pixel.
module tb_image_line_buffer;
  import gmm_pkg::*;
  localparam int W = 32, H = 64;

  logic clk = 0, rst = 1;
  logic in_valid;
  logic [PIX_W-1:0] in_pix;
  logic out_valid;
  logic [PIX_W-1:0] win [3][3];
  logic [4:0] out_x;
  logic [5:0] out_y;
  int checks = 0, failures = 0;
  int img [2][H][W];
  int n_out = 0;
  logic expect_out;

  image_line_buffer #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst && (out_valid || expect_out)) begin
      int f, k, cx, cy;
      bit bad;
      f = n_out / ((W-2) * (H-2));
      k = n_out % ((W-2) * (H-2));
      cx = k % (W-2) + 1; cy = k / (W-2) + 1;
      bad = !out_valid || !expect_out || int'(out_x) != cx || int'(out_y) != cy;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          if (int'(win[r][c]) != img[f][cy-1+r][cx-1+c]) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL: window %0d at (%0d,%0d) got (%0d,%0d)", n_out, cx, cy, out_x, out_y);
      end
      n_out++;
    end
  end

  initial begin
    in_valid = 0; in_pix = 0; expect_out = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[f][y][x] = $urandom_range(0, 255);
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(0, 3) == 0) begin
            in_valid <= 0; @(posedge clk); expect_out <= 0;
          end
          in_valid <= 1;
          in_pix <= PIX_W'(img[f][y][x]);
          @(posedge clk);
          expect_out <= (x >= 2 && y >= 2);
        end
    in_valid <= 0;
    @(posedge clk);
    expect_out <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != 2 * (W-2) * (H-2)) begin failures++; $display("FAIL: %0d windows", n_out); end
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
