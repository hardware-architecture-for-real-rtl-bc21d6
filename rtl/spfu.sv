// spfu: shortest path finding unit, one per node j of the graph.
//
// Holds the tentative distance d(s, j) from the current source s and a flag
// marking it infinite. Each step the characteristic-path-length unit presents
// the current node k (its distance d(s,k) and infinite flag) and the PLI
// weight w(k, j). The unit maps the weight to an edge length 1 - w (Q.7:
// 128 - w), a zero weight meaning "no edge" (infinite length), and relaxes
//   d(s, j) <- min(d(s, j), d(s, k) + (1 - w(k, j))).
// With `init` high the candidate is loaded unconditionally, which starts a new
// source (the current node is then the source itself at distance 0, so the
// loaded value is the direct edge length, Dijkstra's initial step).
// `en` low (node j already visited) freezes the unit.
// Timing: one relaxation per clock, result registered.
// The mapping 1 - w, the zero test and the compare-and-select structure follow
// the document; the init input is this design's way of starting a source.
module spfu #(
  parameter int W      = fc_pkg::W_W,
  parameter int DIST_W = fc_pkg::W_FRAC + $clog2(fc_pkg::N_CH) + 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              init,
  input  logic [W-1:0]      pli,
  input  logic [DIST_W-1:0] cur_dist,
  input  logic              cur_inf,
  output logic [DIST_W-1:0] min_dist,
  output logic              min_inf
);
  localparam int ONE = 1 << fc_pkg::W_FRAC;

  logic [DIST_W-1:0] cand;
  logic              cand_inf, take;

  always_comb begin
    cand     = cur_dist + DIST_W'(ONE - int'(pli));
    cand_inf = cur_inf || (pli == '0);
    take     = init || (!cand_inf && (min_inf || (cand < min_dist)));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      min_dist <= '0;
      min_inf  <= 1'b1;
    end else if (en && take) begin
      min_dist <= cand;
      min_inf  <= cand_inf;
    end
  end
endmodule
