// ecc_rad_dia: eccentricity of every node, radius and diameter of the graph.
//
// Consumes the serial stream of shortest distances d(s, j) that the
// characteristic-path-length unit produces, so the distances need no second
// computation. For each source s a comparator keeps the running maximum of
// the finite distances to the other nodes; when the last distance of s
// arrives it is the eccentricity of s, and two more comparators keep the
// minimum (radius) and maximum (diameter) of the eccentricities.
// A node with no finite path gets eccentricity 0. Distances are Q.7.
// Timing: everything is registered on the clock edge that consumes the last
// distance; `valid` rises together with the path length (N^2+N+1 clocks).
// The comparator structure follows the document; treating infinite
// distances as absent is this design's choice.
module ecc_rad_dia #(
  parameter int N      = fc_pkg::N_CH,
  parameter int DIST_W = fc_pkg::W_FRAC + $clog2(fc_pkg::N_CH) + 1,
  parameter int NB     = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic              fd_valid,
  input  logic [NB-1:0]     fd_src,
  input  logic [NB-1:0]     fd_dst,
  input  logic [DIST_W-1:0] fd_dist,
  input  logic              fd_inf,
  input  logic              fd_last,
  output logic              valid,
  output logic [DIST_W-1:0] ecc [N],
  output logic [DIST_W-1:0] radius,
  output logic [DIST_W-1:0] diameter
);
  logic [DIST_W-1:0] run, v, nmax;

  always_comb begin
    v    = (!fd_inf && (fd_dst != fd_src)) ? fd_dist : '0;
    nmax = (fd_dst == '0) ? v : ((v > run) ? v : run);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      run <= '0; valid <= 1'b0; radius <= '0; diameter <= '0;
      for (int j = 0; j < N; j++) ecc[j] <= '0;
    end else if (clear) begin
      valid <= 1'b0;
    end else if (fd_valid) begin
      run <= nmax;
      if (fd_dst == NB'(N - 1)) begin
        ecc[fd_src] <= nmax;
        radius      <= ((fd_src == '0) || (nmax < radius))   ? nmax : radius;
        diameter    <= ((fd_src == '0) || (nmax > diameter)) ? nmax : diameter;
      end
      if (fd_last) valid <= 1'b1;
    end
  end
endmodule
