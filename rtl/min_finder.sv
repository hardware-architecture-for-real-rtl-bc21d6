// min_finder: minimum finding unit of the characteristic-path-length unit.
//
// Combinational. Among the nodes not yet visited it selects the one with the
// smallest tentative distance; finite distances beat infinite ones and ties go
// to the lower index. `found` is low when every node is visited. It returns
// the index, distance and infinite flag of the chosen node, which become the
// next "current node". The document gives this unit's function; the linear
// compare chain is this design's choice.
module min_finder #(
  parameter int N      = fc_pkg::N_CH,
  parameter int DIST_W = fc_pkg::W_FRAC + $clog2(fc_pkg::N_CH) + 1,
  parameter int NB     = $clog2(N)
) (
  input  logic [DIST_W-1:0] dists [N],
  input  logic              infs  [N],
  input  logic [N-1:0]      visited,
  output logic              found,
  output logic [NB-1:0]     idx,
  output logic [DIST_W-1:0] min_dist,
  output logic              min_inf
);
  always_comb begin
    found    = 1'b0;
    idx      = '0;
    min_dist = '0;
    min_inf  = 1'b1;
    for (int j = 0; j < N; j++) begin
      if (!visited[j]) begin
        if (!found || (min_inf && !infs[j]) ||
            (!min_inf && !infs[j] && (dists[j] < min_dist))) begin
          found    = 1'b1;
          idx      = NB'(j);
          min_dist = dists[j];
          min_inf  = infs[j];
        end
      end
    end
  end
endmodule
