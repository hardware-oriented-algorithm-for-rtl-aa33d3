// feature_hist: the feature memory of the circuit.
//
// Holds N_PAIR x N_CELL x N_MIX = 3,024 feature values, the responsibilities
// summed over one image. Feature f = p*216 + cell*6 + k belongs to pair type
// p, cell and component k. Every pair type has its own update port and its
// own banks (one per component, N_CELL counters each, one write port), so
// all 14 ports can add in the same clock. The
// read port returns the 216 features of pair type rd_step combinationally,
// the chunk the classifier takes per clock. clear zeroes everything in one
// clock and wins over updates. 16-bit counters cannot overflow: a cell holds
// at most 64 pairs of a type, 64 x 240 < 2^16.
// The 3,024 features and the 216-feature chunks follow the reference design;
// the memory layout and the clear are own choices.
module feature_hist
  import gmm_pkg::*;
(
  input  logic                  clk,
  input  logic                  clear,
  input  resp_t                 upd  [N_PAIR],
  input  logic [PAIR_IDX_W-1:0] rd_step,
  output logic [HIST_W-1:0]     rd_data [CHUNK]
);
  // One bank of N_CELL counters per pair type p and component k, with a
  // single write port each.
  logic [HIST_W-1:0] bank_q [N_PAIR][N_MIX][N_CELL];

  for (genvar p = 0; p < N_PAIR; p++) begin : g_pair
    for (genvar k = 0; k < N_MIX; k++) begin : g_mix
      logic [HIST_W-1:0] mem [N_CELL];

      always_ff @(posedge clk) begin
        if (clear) begin
          for (int c = 0; c < N_CELL; c++) mem[c] <= '0;
        end else if (upd[p].valid) begin
          mem[upd[p].cell_id] <= mem[upd[p].cell_id] + HIST_W'(upd[p].r[k]);
        end
      end

      for (genvar c = 0; c < N_CELL; c++) begin : g_rd
        assign bank_q[p][k][c] = mem[c];
      end
    end
  end

  always_comb begin
    for (int c = 0; c < N_CELL; c++)
      for (int k = 0; k < N_MIX; k++)
        rd_data[c * N_MIX + k] = (int'(rd_step) < N_PAIR) ? bank_q[rd_step][k][c] : '0;
  end
endmodule
