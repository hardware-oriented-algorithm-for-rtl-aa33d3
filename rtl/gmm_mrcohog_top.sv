// gmm_mrcohog_top: human recognition circuit built on hardware-oriented
// GMM-MRCoHOG features and a binarized neural network.
//
// A 32x64 8-bit image enters one pixel per clock in raster order
// (pix_valid / pix_ready; the source may pause, and a pixel it offers while
// pix_ready is low must stay until taken). Three streams are processed side by side: the
// image itself and its 1/2 and 1/4 reductions (downsample2x). For each, a
// three-line image buffer gives 3x3 windows, a derivative filter the
// differences fx, fy, and the tangent-table angle unit one of 36 gradient
// directions. The pair stage forms 14 types of direction co-occurrence
// pairs (within each resolution and between neighbouring resolutions), one
// gmm_resp per type turns a pair into the responsibilities of 6 rectangular
// mixture components, and feature_hist sums them into 3,024 features per
// image. After the last pixel and a fixed drain of DRAIN_CYC clocks the bnn
// reads the features 216 per clock and decides human / not human.
//
// Control: STREAM (pix_ready high, 2,048 pixels) -> DRAIN -> CLASSIFY; when
// the network is done res_valid pulses with the class and the hidden sum,
// the features are cleared and the next image may start. From the first
// pixel to the result: 2,048 + DRAIN_CYC + 17 = 2,085 clocks by default,
// about 21 us at 100 MHz.
// The component table (cfg_*) and the network's weights (w_*), thresholds
// and output layer come from offline training and are loaded through ports.
// The structure follows the reference design; the control, the drain and
// the configuration ports are own choices.
module gmm_mrcohog_top
  import gmm_pkg::*;
#(
  parameter int FRAC_BITS = 6,
  parameter int DRAIN_CYC = 20
) (
  input  logic                  clk,
  input  logic                  rst,
  // pixel stream
  input  logic                  pix_valid,
  output logic                  pix_ready,
  input  logic [PIX_W-1:0]      pix,
  // mixture component table
  input  logic                  cfg_we,
  input  logic [PAIR_IDX_W-1:0] cfg_pair,
  input  logic [MIX_IDX_W-1:0]  cfg_k,
  input  gauss_t                cfg_g,
  // network parameters
  input  logic                  w_we,
  input  logic                  w_hid,
  input  logic [PAIR_IDX_W-1:0] w_step,
  input  logic [CHUNK-1:0]      w_data,
  input  logic [HIST_W-1:0]     th_in,
  input  logic [11:0]           th_hid,
  input  logic                  v_out [2],
  input  logic signed [7:0]     b_out [2],
  // result
  output logic                  res_valid,
  output logic                  res_human,
  output logic [11:0]           res_hid_sum
);
  localparam int XW = $clog2(IMG_W);
  localparam int YW = $clog2(IMG_H);
  localparam int NPIX = IMG_W * IMG_H;

  typedef enum logic [1:0] {C_STREAM, C_DRAIN, C_CLASSIFY} ctrl_t;

  ctrl_t                  state;
  logic [$clog2(NPIX)-1:0] pcount;
  logic [$clog2(DRAIN_CYC+1)-1:0] dcount;
  logic                   bnn_start, bnn_done;
  logic                   in_fire;

  assign pix_ready = (state == C_STREAM);
  assign in_fire   = pix_valid && pix_ready;

  // ---------------- resolution pyramid ----------------
  logic             lv_valid [N_RES];
  logic [PIX_W-1:0] lv_pix   [N_RES];

  assign lv_valid[0] = in_fire;
  assign lv_pix[0]   = pix;

  for (genvar l = 1; l < N_RES; l++) begin : g_ds
    downsample2x #(.W_IN(IMG_W >> (l-1)), .H_IN(IMG_H >> (l-1))) u_ds (
      .clk, .rst,
      .in_valid (lv_valid[l-1]), .in_pix(lv_pix[l-1]),
      .out_valid(lv_valid[l]),   .out_pix(lv_pix[l])
    );
  end

  // ---------------- gradients per resolution ----------------
  logic             g_valid [N_RES];
  logic [DIR_W-1:0] g_dir   [N_RES];
  logic [XW-1:0]    g_x     [N_RES];
  logic [YW-1:0]    g_y     [N_RES];

  for (genvar l = 0; l < N_RES; l++) begin : g_grad
    localparam int LW  = IMG_W >> l;
    localparam int LH  = IMG_H >> l;
    localparam int LXW = $clog2(LW);
    localparam int LYW = $clog2(LH);

    logic             w_valid;
    logic [PIX_W-1:0] win [3][3];
    logic [LXW-1:0]   w_x;
    logic [LYW-1:0]   w_y;
    logic             d_valid;
    logic signed [GRAD_W-1:0] fx, fy;
    logic [LXW-1:0]   d_x;
    logic [LYW-1:0]   d_y;
    logic [XW+YW-1:0] a_side;

    image_line_buffer #(.W(LW), .H(LH)) u_ilb (
      .clk, .rst,
      .in_valid (lv_valid[l]), .in_pix(lv_pix[l]),
      .out_valid(w_valid), .win, .out_x(w_x), .out_y(w_y)
    );

    derivative_filter #(.XW(LXW), .YW(LYW)) u_df (
      .clk, .rst,
      .in_valid (w_valid), .win, .in_x(w_x), .in_y(w_y),
      .out_valid(d_valid), .fx, .fy, .out_x(d_x), .out_y(d_y)
    );

    tan_angle #(.FRAC_BITS(FRAC_BITS), .SIDE_W(XW + YW)) u_ang (
      .clk, .rst,
      .in_valid (d_valid), .fx, .fy, .in_side({XW'(d_x), YW'(d_y)}),
      .out_valid(g_valid[l]), .dir(g_dir[l]), .out_side(a_side)
    );

    assign g_x[l] = a_side[XW+YW-1:YW];
    assign g_y[l] = a_side[YW-1:0];
  end

  // ---------------- co-occurrence, mixture, features ----------------
  pair_t pairs [N_PAIR];
  resp_t resp  [N_PAIR];

  gradient_pair #(.XW(XW), .YW(YW)) u_pair (
    .clk, .rst, .g_valid, .g_dir, .g_x, .g_y, .pairs
  );

  for (genvar p = 0; p < N_PAIR; p++) begin : g_gmm
    gmm_resp #(.PAIR_ID(p)) u_gmm (
      .clk, .rst, .cfg_we, .cfg_pair, .cfg_k, .cfg_g,
      .in_pair(pairs[p]), .out_resp(resp[p])
    );
  end

  logic [PAIR_IDX_W-1:0] bnn_step;
  logic [HIST_W-1:0]     feat_chunk [CHUNK];

  feature_hist u_hist (
    .clk, .clear(rst || bnn_done), .upd(resp),
    .rd_step(bnn_step), .rd_data(feat_chunk)
  );

  // ---------------- classifier ----------------
  logic [11:0]      hid_sum [1];
  logic [11:0]      th_hid_a [1];
  logic [0:0]       v_out_a [2];

  assign th_hid_a[0] = th_hid;
  assign v_out_a[0]  = v_out[0];
  assign v_out_a[1]  = v_out[1];

  bnn #(.N_IN(N_FEAT), .CH(CHUNK), .N_HID(1), .N_OUT(2), .CNT_W(12), .STEP_W(PAIR_IDX_W)) u_bnn (
    .clk, .rst,
    .start(bnn_start), .busy(), .step(bnn_step), .chunk(feat_chunk),
    .th_in, .th_hid(th_hid_a), .v_out(v_out_a), .b_out,
    .w_we, .w_hid, .w_step, .w_data,
    .done(bnn_done), .human(res_human), .hid_sum
  );

  assign res_valid   = bnn_done;
  assign res_hid_sum = hid_sum[0];

  // ---------------- frame control ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= C_STREAM;
      pcount    <= '0;
      dcount    <= '0;
      bnn_start <= 1'b0;
    end else begin
      bnn_start <= 1'b0;
      unique case (state)
        C_STREAM: if (in_fire) begin
          if (int'(pcount) == NPIX - 1) begin
            pcount <= '0;
            dcount <= '0;
            state  <= C_DRAIN;
          end else begin
            pcount <= pcount + 1'b1;
          end
        end
        C_DRAIN: begin
          dcount <= dcount + 1'b1;
          if (int'(dcount) == DRAIN_CYC - 1) begin
            bnn_start <= 1'b1;
            state     <= C_CLASSIFY;
          end
        end
        C_CLASSIFY: if (bnn_done) state <= C_STREAM;
        default: state <= C_STREAM;
      endcase
    end
  end

  // Source rule: a pixel offered while the circuit is not ready stays
  // offered, unchanged, until it is taken.
  assert property (@(posedge clk) disable iff (rst)
                   pix_valid && !pix_ready |=> pix_valid && $stable(pix))
    else $error("gmm_mrcohog_top: pixel withdrawn or changed while stalled");
endmodule
