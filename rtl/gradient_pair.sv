// gradient_pair: forms the gradient co-occurrence pairs of three resolutions.
//
// Inputs are the three direction streams (level 0 = full, 1 = 1/2, 2 = 1/4
// resolution) with their pixel coordinates in that level. Outputs are 14 pair
// ports, one per pair type, each with a valid bit, the two directions (a, b)
// and the image cell of the pair:
//   type 4*l + o  (l = level, o = 0..3): centre and its right, down-left,
//                 down or down-right neighbour in level l (a = centre)
//   type 12       full (2X,2Y) with half (X,Y)   (a = finer, b = coarser)
//   type 13       half (2X,2Y) with quarter (X,Y)
// The cell is that of the pair's position scaled to full resolution, on a
// grid of 4 columns of 8 pixels by 9 row bands (band = y*9/64). Two clocks
// from a direction to its pairs; a port fires at most once per clock.
// The reference design names this stage only; the pair types, the cells and
// this organisation are own choices sized to give its 3,024 features.
module gradient_pair
  import gmm_pkg::*;
#(
  parameter int XW = $clog2(IMG_W),
  parameter int YW = $clog2(IMG_H)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             g_valid [N_RES],
  input  logic [DIR_W-1:0] g_dir   [N_RES],
  input  logic [XW-1:0]    g_x     [N_RES],
  input  logic [YW-1:0]    g_y     [N_RES],
  output pair_t            pairs   [N_PAIR]
);
  logic             lb_valid [N_RES];
  logic [DIR_W-1:0] lb_c     [N_RES];
  logic [DIR_W-1:0] lb_nb    [N_RES][N_INTRA];
  logic [XW-1:0]    lb_x     [N_RES];
  logic [YW-1:0]    lb_y     [N_RES];

  logic             cr_valid [N_RES-1];
  logic [DIR_W-1:0] cr_hi    [N_RES-1];
  logic [DIR_W-1:0] cr_lo    [N_RES-1];
  logic [XW-1:0]    cr_x     [N_RES-1];
  logic [YW-1:0]    cr_y     [N_RES-1];

  for (genvar l = 0; l < N_RES; l++) begin : g_lvl
    grad_line_buffer #(.W(IMG_W >> l), .XW(XW), .YW(YW)) u_glb (
      .clk, .rst,
      .in_valid (g_valid[l]), .in_dir(g_dir[l]), .in_x(g_x[l]), .in_y(g_y[l]),
      .out_valid(lb_valid[l]), .centre(lb_c[l]), .nb(lb_nb[l]),
      .out_x    (lb_x[l]), .out_y(lb_y[l])
    );
  end

  for (genvar l = 0; l < N_RES - 1; l++) begin : g_cross
    cross_res_buffer #(.W_HI(IMG_W >> l), .XW(XW), .YW(YW)) u_crb (
      .clk, .rst,
      .hi_valid (g_valid[l]),   .hi_dir(g_dir[l]),   .hi_x(g_x[l]),   .hi_y(g_y[l]),
      .lo_valid (g_valid[l+1]), .lo_dir(g_dir[l+1]), .lo_x(g_x[l+1]), .lo_y(g_y[l+1]),
      .out_valid(cr_valid[l]), .out_hi(cr_hi[l]), .out_lo(cr_lo[l]),
      .out_x    (cr_x[l]), .out_y(cr_y[l])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int p = 0; p < N_PAIR; p++) pairs[p].valid <= 1'b0;
    end else begin
      for (int l = 0; l < N_RES; l++) begin
        for (int o = 0; o < N_INTRA; o++) begin
          pairs[l*N_INTRA + o].valid   <= lb_valid[l];
          pairs[l*N_INTRA + o].a       <= lb_c[l];
          pairs[l*N_INTRA + o].b       <= lb_nb[l][o];
          pairs[l*N_INTRA + o].cell_id <= cell_of(int'(lb_x[l]) << l, int'(lb_y[l]) << l);
        end
      end
      for (int l = 0; l < N_RES - 1; l++) begin
        pairs[N_RES*N_INTRA + l].valid   <= cr_valid[l];
        pairs[N_RES*N_INTRA + l].a       <= cr_hi[l];
        pairs[N_RES*N_INTRA + l].b       <= cr_lo[l];
        pairs[N_RES*N_INTRA + l].cell_id <= cell_of(int'(cr_x[l]) << (l + 1), int'(cr_y[l]) << (l + 1));
      end
    end
  end
endmodule
