// cross_res_buffer: pairs a gradient with the gradient at the same place in
// the next finer resolution.
//
// The finer stream writes the directions of its even rows and even columns
// into two banks of W_HI/2 entries, bank (y/2) mod 2. A coarser direction at
// (X, Y) is paired, one clock later, with the finer direction at (2X, 2Y),
// read from bank Y mod 2. The finer row 2Y is complete about two finer rows
// before the coarser row Y appears, and the other bank takes the rows written
// meanwhile, so no entry is overwritten before it is read.
// Pairing across resolutions is what the reference design's multiresolution
// co-occurrence implies; the (2X, 2Y) correspondence and this buffer are own
// choices.
module cross_res_buffer
  import gmm_pkg::*;
#(
  parameter int W_HI = IMG_W,
  parameter int XW   = $clog2(IMG_W),
  parameter int YW   = $clog2(IMG_H)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             hi_valid,
  input  logic [DIR_W-1:0] hi_dir,
  input  logic [XW-1:0]    hi_x,
  input  logic [YW-1:0]    hi_y,
  input  logic             lo_valid,
  input  logic [DIR_W-1:0] lo_dir,
  input  logic [XW-1:0]    lo_x,
  input  logic [YW-1:0]    lo_y,
  output logic             out_valid,
  output logic [DIR_W-1:0] out_hi,
  output logic [DIR_W-1:0] out_lo,
  output logic [XW-1:0]    out_x,
  output logic [YW-1:0]    out_y
);
  localparam int AW = $clog2(W_HI / 2);

  logic [DIR_W-1:0] bank [2][W_HI/2];

  always_ff @(posedge clk) begin
    if (hi_valid && !hi_x[0] && !hi_y[0])
      bank[hi_y[1]][AW'(hi_x >> 1)] <= hi_dir;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= lo_valid;
      if (lo_valid) begin
        out_hi <= bank[lo_y[0]][AW'(lo_x)];
        out_lo <= lo_dir;
        out_x  <= lo_x;
        out_y  <= lo_y;
      end
    end
  end
endmodule
