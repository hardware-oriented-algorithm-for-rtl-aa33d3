// gmm_resp: responsibilities of the mixture components for one pair type.
//
// Each of the N_MIX components is a rectangle on the 36x36 direction plane:
// centre (ca, cb) and half widths 2^wa, 2^wb, so the membership test is two
// subtractions and two shifts, (|a-ca| >> wa) == 0 and (|b-cb| >> wb) == 0.
// The responsibility of a component is RESP_ONE / n if the pair lies inside
// it and n components contain the pair, else 0 (RESP_ONE = 240 makes every
// share exact). The component table is written through the cfg port (write
// enable, pair type, component index, entry) and cleared by reset. One clock
// from pair to responsibilities.
// Power-of-two widths, rectangular components and 6 components follow the
// reference design; the equal sharing between overlapping rectangles is the
// simple fuzzy rule chosen here, as the exact inference rule is not given.
module gmm_resp
  import gmm_pkg::*;
#(
  parameter int PAIR_ID = 0
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  cfg_we,
  input  logic [PAIR_IDX_W-1:0] cfg_pair,
  input  logic [MIX_IDX_W-1:0]  cfg_k,
  input  gauss_t                cfg_g,
  input  pair_t                 in_pair,
  output resp_t                 out_resp
);
  typedef logic [RESP_W-1:0] resp_w_t;

  function automatic resp_w_t share(input int n);
    return (n == 0) ? '0 : resp_w_t'(RESP_ONE / n);
  endfunction

  gauss_t           g   [N_MIX];
  logic [N_MIX-1:0] member;
  logic [MIX_IDX_W:0] n_in;

  function automatic logic [DIR_W-1:0] absdiff(input logic [DIR_W-1:0] u, input logic [DIR_W-1:0] v);
    return (u >= v) ? u - v : v - u;
  endfunction

  always_comb begin
    for (int k = 0; k < N_MIX; k++)
      member[k] = ((absdiff(in_pair.a, g[k].ca) >> g[k].wa) == '0) &&
                  ((absdiff(in_pair.b, g[k].cb) >> g[k].wb) == '0);
    n_in = ($bits(n_in))'($countones(member));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N_MIX; k++) g[k] <= '0;
    end else if (cfg_we && cfg_pair == PAIR_IDX_W'(PAIR_ID) && int'(cfg_k) < N_MIX) begin
      g[cfg_k] <= cfg_g;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_resp.valid <= 1'b0;
    end else begin
      out_resp.valid   <= in_pair.valid;
      out_resp.cell_id <= in_pair.cell_id;
      for (int k = 0; k < N_MIX; k++)
        out_resp.r[k] <= member[k] ? share(int'(n_in)) : '0;
    end
  end
endmodule
