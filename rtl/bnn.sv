// bnn: binarized neural network, N_IN inputs, N_HID hidden neurons, N_OUT
// outputs (3,024-1-2 by default).
//
// Input layer: feature i becomes bit x_i = (feature_i >= th_in).
// Hidden neuron j: s_j = popcount(XNOR(x, w_j)), the number of inputs that
// agree with its binary weights; its binary activation is h_j = (s_j >= th_hid_j).
// Output neuron o: score_o = b_out_o + sum_j (h_j == v_out_oj ? +1 : -1);
// human = score_1 > score_0.
// After a start pulse the network asks for chunk 0..N_STEP-1 on `step`, one
// per clock, takes the CHUNK features on `chunk` in the same clock and adds
// their XNOR counts; then the activation and output layers take one clock
// each and `done` pulses with the class and the hidden sums. done rises
// N_STEP + 3 = 17 clocks after the edge that takes start. Hidden weights are
// written CHUNK bits at a time through w_we / w_hid / w_step / w_data; the
// thresholds and the output layer are static inputs.
// The layer sizes, the binary weights and activations and the 216-feature
// chunks follow the reference design; the input binarization by one shared
// threshold, the popcount form and the output layer arithmetic are own choices.
module bnn
  import gmm_pkg::*;
#(
  parameter int N_IN   = N_FEAT,
  parameter int CH     = CHUNK,
  parameter int N_HID  = 1,
  parameter int N_OUT  = 2,
  parameter int CNT_W  = $clog2(N_IN + 1),
  parameter int STEP_W = $clog2(N_IN / CH)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  output logic                    busy,
  output logic [STEP_W-1:0]       step,
  input  logic [HIST_W-1:0]       chunk   [CH],
  input  logic [HIST_W-1:0]       th_in,
  input  logic [CNT_W-1:0]        th_hid  [N_HID],
  input  logic [N_HID-1:0]        v_out   [N_OUT],
  input  logic signed [7:0]       b_out   [N_OUT],
  input  logic                    w_we,
  input  logic [$clog2(N_HID+1)-1:0] w_hid,
  input  logic [STEP_W-1:0]       w_step,
  input  logic [CH-1:0]           w_data,
  output logic                    done,
  output logic                    human,
  output logic [CNT_W-1:0]        hid_sum [N_HID]
);
  localparam int NS = N_IN / CH;

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_ACT, S_OUT} state_t;

  state_t            state;
  logic [CH-1:0]     w   [N_HID][NS];
  logic [CNT_W-1:0]  acc [N_HID];
  logic [CH-1:0]     xbit;
  logic [N_HID-1:0]  h;

  always_comb
    for (int i = 0; i < CH; i++) xbit[i] = (chunk[i] >= th_in);

  always_ff @(posedge clk)
    if (w_we && int'(w_hid) < N_HID && int'(w_step) < NS) w[w_hid][w_step] <= w_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      step  <= '0;
      done  <= 1'b0;
      human <= 1'b0;
      for (int j = 0; j < N_HID; j++) begin
        acc[j]     <= '0;
        hid_sum[j] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ACC;
          step  <= '0;
          for (int j = 0; j < N_HID; j++) acc[j] <= '0;
        end
        S_ACC: begin
          for (int j = 0; j < N_HID; j++)
            acc[j] <= acc[j] + CNT_W'($countones(~(xbit ^ w[j][step])));
          if (int'(step) == NS - 1) state <= S_ACT;
          else                      step  <= step + 1'b1;
        end
        S_ACT: begin
          for (int j = 0; j < N_HID; j++) begin
            h[j]       <= (acc[j] >= th_hid[j]);
            hid_sum[j] <= acc[j];
          end
          state <= S_OUT;
        end
        S_OUT: begin
          automatic int score [N_OUT];
          for (int o = 0; o < N_OUT; o++) begin
            score[o] = int'(b_out[o]);
            for (int j = 0; j < N_HID; j++)
              score[o] += (h[j] == v_out[o][j]) ? 1 : -1;
          end
          human <= (score[1] > score[0]);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // A start pulse is only honoured when idle.
  assert property (@(posedge clk) disable iff (rst) start |-> state == S_IDLE)
    else $error("bnn: start while busy");
endmodule
