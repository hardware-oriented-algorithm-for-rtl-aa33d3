// derivative_filter: luminance differences of a 3x3 window.
//
// fx = right - left and fy = bottom - top of the window centre (central
// differences), each a signed 9-bit value in -255..255, the range of the
// gradient plane the angle stage works on. One clock of latency; the centre
// coordinates travel along unchanged.
// The reference design names a 3x3 derivative filter; the central-difference
// kernel and its sign convention are this design's choice.
module derivative_filter
  import gmm_pkg::*;
#(
  parameter int XW = 5,
  parameter int YW = 6
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic [PIX_W-1:0]         win [3][3],
  input  logic [XW-1:0]            in_x,
  input  logic [YW-1:0]            in_y,
  output logic                     out_valid,
  output logic signed [GRAD_W-1:0] fx,
  output logic signed [GRAD_W-1:0] fy,
  output logic [XW-1:0]            out_x,
  output logic [YW-1:0]            out_y
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        fx    <= $signed({1'b0, win[1][2]}) - $signed({1'b0, win[1][0]});
        fy    <= $signed({1'b0, win[2][1]}) - $signed({1'b0, win[0][1]});
        out_x <= in_x;
        out_y <= in_y;
      end
    end
  end
endmodule
