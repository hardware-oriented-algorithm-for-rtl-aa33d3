// tb_downsample2x: streams two random 32x64 images, with random idle clocks,
// through the 2x2 mean reduction and checks every output pixel against
// (a + b + c + d + 2) / 4 of its block, the 16x32 outputs per image in
// raster order, and that each output appears one clock after the last
// pixel of its block.
module tb_downsample2x;
  import gmm_pkg::*;
  localparam int W = 32, H = 64;

  logic clk = 0, rst = 1;
  logic in_valid;
  logic [PIX_W-1:0] in_pix;
  logic out_valid;
  logic [PIX_W-1:0] out_pix;
  int checks = 0, failures = 0;
  int img [2][H][W];
  int n_out = 0;
  logic last_of_block;

  downsample2x #(.W_IN(W), .H_IN(H)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      int f, k, X, Y, e;
      f = n_out / ((W/2) * (H/2));
      k = n_out % ((W/2) * (H/2));
      X = k % (W/2); Y = k / (W/2);
      e = (img[f][2*Y][2*X] + img[f][2*Y][2*X+1] + img[f][2*Y+1][2*X] + img[f][2*Y+1][2*X+1] + 2) / 4;
      checks++;
      if (int'(out_pix) != e || !last_of_block) begin
        failures++;
        if (failures < 10) $display("FAIL: out %0d got %0d expected %0d timing %0d", n_out, out_pix, e, last_of_block);
      end
      n_out++;
    end
  end

  initial begin
    in_valid = 0; in_pix = 0; last_of_block = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[f][y][x] = $urandom_range(0, 255);
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(0, 3) == 0) begin
            in_valid <= 0; @(posedge clk); last_of_block <= 0;
          end
          in_valid <= 1;
          in_pix <= PIX_W'(img[f][y][x]);
          @(posedge clk);
          last_of_block <= (x % 2 == 1) && (y % 2 == 1);
        end
    in_valid <= 0;
    @(posedge clk);
    last_of_block <= 0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != 2 * (W/2) * (H/2)) begin failures++; $display("FAIL: %0d outputs", n_out); end
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
