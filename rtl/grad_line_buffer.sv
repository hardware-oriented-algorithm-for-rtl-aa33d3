// grad_line_buffer: two-line buffer of gradient directions.
//
// Gradient directions arrive in raster order with their pixel coordinates
// (interior pixels only, x = 1..W-2 on every row y = 1..H-2). One line memory
// holds the previous gradient row, two registers the last two directions of
// the current row. When direction (x, y) arrives and x >= 3, y >= 2, the
// centre (x-1, y-1) of the previous row is presented, one clock later, with
// its four co-occurrence neighbours:
//   nb[0] right (x, y-1)   nb[1] down-left (x-2, y)
//   nb[2] down  (x-1, y)   nb[3] down-right (x, y)
// The two-line organisation follows the reference design; the four offsets
// and the border rule (centres need all four neighbours) are own choices.
module grad_line_buffer
  import gmm_pkg::*;
#(
  parameter int W  = IMG_W,
  parameter int XW = $clog2(IMG_W),
  parameter int YW = $clog2(IMG_H)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [DIR_W-1:0] in_dir,
  input  logic [XW-1:0]    in_x,
  input  logic [YW-1:0]    in_y,
  output logic             out_valid,
  output logic [DIR_W-1:0] centre,
  output logic [DIR_W-1:0] nb [N_INTRA],
  output logic [XW-1:0]    out_x,
  output logic [YW-1:0]    out_y
);
  localparam int AW = $clog2(W);

  logic [DIR_W-1:0] prev [W];   // previous gradient row
  logic [DIR_W-1:0] p1;         // previous row at x-1, read before overwrite
  logic [DIR_W-1:0] d1, d2;     // current row at x-1, x-2
  logic [DIR_W-1:0] above;

  assign above = prev[AW'(in_x)];

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        prev[AW'(in_x)] <= in_dir;
        p1 <= above;
        d1 <= in_dir;
        d2 <= d1;
        if (in_x >= XW'(3) && in_y >= YW'(2)) begin
          centre    <= p1;
          nb[0]     <= above;
          nb[1]     <= d2;
          nb[2]     <= d1;
          nb[3]     <= in_dir;
          out_x     <= in_x - 1'b1;
          out_y     <= in_y - 1'b1;
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
