// downsample2x: halves a raster image stream in both directions.
//
// Each output pixel is the rounded mean of a 2x2 block of input pixels,
// (a + b + c + d + 2) >> 2. The sums of horizontal pixel pairs of an even row
// are kept in a W_IN/2-entry line memory and completed on the following odd
// row, so one output pixel leaves, one clock after its last input pixel, for
// every second input pixel of every odd row. Input pixels arrive in raster
// order with in_valid; gaps between them are allowed. Position counters wrap
// at the image size, so back-to-back frames need no start signal.
// The reference design only names the 1/2 and 1/4 resized images; the 2x2
// mean and its rounding are this design's choice.
module downsample2x
  import gmm_pkg::*;
#(
  parameter int W_IN = IMG_W,
  parameter int H_IN = IMG_H
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pix,
  output logic             out_valid,
  output logic [PIX_W-1:0] out_pix
);
  localparam int XW = $clog2(W_IN);
  localparam int YW = $clog2(H_IN);

  logic [XW-1:0]    x;
  logic [YW-1:0]    y;
  logic [PIX_W-1:0] hold;                   // left pixel of the current pair
  logic [PIX_W:0]   psum [W_IN/2];          // pair sums of the even row
  logic [PIX_W:0]   pair_sum;
  logic [PIX_W+2:0] quad_sum;

  assign pair_sum = {1'b0, hold} + {1'b0, in_pix};
  assign quad_sum = {2'b00, psum[x[XW-1:1]]} + {2'b00, pair_sum} + (PIX_W+3)'(2);

  always_ff @(posedge clk) begin
    if (rst) begin
      x         <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (!x[0]) begin
          hold <= in_pix;
        end else if (!y[0]) begin
          psum[x[XW-1:1]] <= pair_sum;
        end else begin
          out_pix   <= quad_sum[PIX_W+1:2];
          out_valid <= 1'b1;
        end
        if (x == XW'(W_IN - 1)) begin
          x <= '0;
          y <= (y == YW'(H_IN - 1)) ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end
endmodule
