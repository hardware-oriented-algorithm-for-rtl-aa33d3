// image_line_buffer: three-line image buffer producing 3x3 windows.
//
// Two line memories hold the two rows above the incoming row. For each
// incoming pixel (x, y) the column {row y-2, row y-1, row y} at x is shifted
// into a 3-column window register; once x >= 2 and y >= 2 the window centred
// on (x-1, y-1) is presented one clock later with out_valid and the centre
// coordinates. Border pixels get no window. win[r][c] is row r (0 = top) and
// column c (0 = left). Counters wrap at the image size.
// The three-line organisation follows the reference design; the window
// ordering, border handling and registered output are this design's choices.
module image_line_buffer
  import gmm_pkg::*;
#(
  parameter int W = IMG_W,
  parameter int H = IMG_H
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pix,
  output logic             out_valid,
  output logic [PIX_W-1:0] win [3][3],
  output logic [$clog2(W)-1:0] out_x,
  output logic [$clog2(H)-1:0] out_y
);
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);

  logic [XW-1:0]    x;
  logic [YW-1:0]    y;
  logic [PIX_W-1:0] line1 [W];   // row y-1
  logic [PIX_W-1:0] line2 [W];   // row y-2
  logic [PIX_W-1:0] col1 [3];    // column x-1
  logic [PIX_W-1:0] col2 [3];    // column x-2

  always_ff @(posedge clk) begin
    if (rst) begin
      x         <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        line2[x] <= line1[x];
        line1[x] <= in_pix;
        col1[0]  <= line2[x];
        col1[1]  <= line1[x];
        col1[2]  <= in_pix;
        col2     <= col1;
        if (x >= XW'(2) && y >= YW'(2)) begin
          for (int r = 0; r < 3; r++) begin
            win[r][0] <= col2[r];
            win[r][1] <= col1[r];
          end
          win[0][2] <= line2[x];
          win[1][2] <= line1[x];
          win[2][2] <= in_pix;
          out_x     <= x - 1'b1;
          out_y     <= y - 1'b1;
          out_valid <= 1'b1;
        end
        if (x == XW'(W - 1)) begin
          x <= '0;
          y <= (y == YW'(H - 1)) ? '0 : y + 1'b1;
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end
endmodule
