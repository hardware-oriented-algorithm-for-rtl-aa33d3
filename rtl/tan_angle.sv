// tan_angle: coarse gradient direction from a fixed-point tangent table.
//
// The first-quadrant angle of (|fx|, |fy|) is found without division or
// arctangent: the table holds T[k] = round(tan(10k deg) * 2^FRAC_BITS) for
// k = 1..8 (three integer bits suffice, tan 80 deg = 5.67), and the direction
// d = 0..8 is the number of k with |fy| * 2^FRAC_BITS >= |fx| * T[k], i.e.
// the sector [10d, 10d+10) deg. The signs of fx and fy then place the sector
// in one of 36 directions counter-clockwise from +fx, with half-open
// quadrants so that a gradient on an axis gets the direction of its exact
// angle (0, 90, 180 or 270 deg):
//   fx>0,  fy>=0: d      fx<=0, fy>0 : 17-d
//   fx<0,  fy<=0: 18+d   fx>=0, fy<0 : 35-d
// A zero gradient takes the first row and falls in direction 8, as the
// comparisons give.
// Pipeline of six registers (input, magnitudes, products, comparisons,
// sector, direction): a result leaves 6 clocks after its input, one per
// clock. SIDE_W bits of side data (pixel coordinates) travel with it.
// The table method, its 10-degree sectors, 3 integer bits, 6 fraction bits
// and the six-clock latency follow the reference design; the rounding of the
// table entries, the pipeline cut and the zero-gradient case are own choices.
module tan_angle
  import gmm_pkg::*;
#(
  parameter int FRAC_BITS = 6,
  parameter int SIDE_W    = 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [GRAD_W-1:0] fx,
  input  logic signed [GRAD_W-1:0] fy,
  input  logic [SIDE_W-1:0]        in_side,
  output logic                     out_valid,
  output logic [DIR_W-1:0]         dir,
  output logic [SIDE_W-1:0]        out_side
);
  localparam int LAT  = 6;
  localparam int MAG_W = PIX_W;                    // |f| <= 255
  localparam int TAB_W = 3 + FRAC_BITS;            // 3 integer bits
  localparam int PRD_W = MAG_W + TAB_W;

  typedef logic [TAB_W-1:0] tab_t;

  function automatic tab_t tan_entry(input int k);
    real t;
    t = $tan(real'(k) * 10.0 * 3.14159265358979 / 180.0) * real'(2 ** FRAC_BITS);
    return tab_t'($rtoi(t + 0.5));
  endfunction

  localparam tab_t TAN_TAB [1:8] = '{tan_entry(1), tan_entry(2), tan_entry(3), tan_entry(4),
                                     tan_entry(5), tan_entry(6), tan_entry(7), tan_entry(8)};

  // stage 0: input register
  logic signed [GRAD_W-1:0] fx0, fy0;
  // stage 1: magnitudes and signs
  logic [MAG_W-1:0] ax1, ay1;
  logic [1:0]       sg1, sg2, sg3, sg4;       // quadrant 0..3
  // stage 2: products
  logic [PRD_W-1:0] px2 [1:8];
  logic [PRD_W-1:0] py2;
  // stage 3: comparisons
  logic [8:1]       ge3;
  // stage 4: sector 0..8
  logic [3:0]       d4;
  logic [LAT-1:0]   vld;
  logic [SIDE_W-1:0] side [LAT];

  always_ff @(posedge clk) begin
    if (rst) vld <= '0;
    else     vld <= {vld[LAT-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    side[0] <= in_side;
    for (int i = 1; i < LAT; i++) side[i] <= side[i-1];

    fx0 <= fx;
    fy0 <= fy;

    ax1 <= MAG_W'(fx0 < 0 ? -fx0 : fx0);
    ay1 <= MAG_W'(fy0 < 0 ? -fy0 : fy0);
    if (fx0 <= 0 && fy0 > 0)       sg1 <= 2'd1;
    else if (fx0 < 0 && fy0 <= 0)  sg1 <= 2'd2;
    else if (fx0 >= 0 && fy0 < 0)  sg1 <= 2'd3;
    else                           sg1 <= 2'd0;

    for (int k = 1; k <= 8; k++) px2[k] <= PRD_W'(ax1) * PRD_W'(TAN_TAB[k]);
    py2 <= PRD_W'(ay1) << FRAC_BITS;
    sg2 <= sg1;

    for (int k = 1; k <= 8; k++) ge3[k] <= (py2 >= px2[k]);
    sg3 <= sg2;

    d4  <= 4'($countones(ge3));
    sg4 <= sg3;

    unique case (sg4)
      2'd0: dir <= DIR_W'(d4);
      2'd1: dir <= DIR_W'(17) - DIR_W'(d4);
      2'd2: dir <= DIR_W'(18) + DIR_W'(d4);
      2'd3: dir <= DIR_W'(35) - DIR_W'(d4);
    endcase
  end

  assign out_valid = vld[LAT-1];
  assign out_side  = side[LAT-1];
endmodule
