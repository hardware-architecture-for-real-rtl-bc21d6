// graph_connectivity: the graph-theoretic parameter system.
//
// Holds the PLI matrix (pli_matrix_reg) and, on `start`, runs two engines side
// by side on it:
//   * clustering_coeff sweeps all triangles and reports, per node, the binary
//     and weighted degree, the triangle sum and the clustering coefficient,
//     plus the mean clustering coefficient; density and transitivity reuse its
//     per-node degree and triangle sum.
//   * cpl_unit runs Dijkstra from every node on the distances 1 - w and gives
//     the characteristic path length; ecc_rad_dia takes the same distance
//     stream for eccentricity, radius and diameter.
// Interface: matrix write port (one symmetric element per clock), `start`
// pulse, per-node result streams, scalar results with valid flags, and
// `done`, a one-clock pulse when every result of the run is available (the
// results then hold until the next run).
// Timing (clocks after the edge that samples start, M = N*C(N-1,2)):
// degree M+1, density M+2, transitivity M+6, mean clustering M+7, path
// length / eccentricity N^2+N+1; done one clock after the last of these.
// Which unit feeds which follows the document's block diagram. The cc_last
// flag of clustering_coeff is not needed here: the mean carries its own valid.
module graph_connectivity #(
  parameter int N      = fc_pkg::N_CH,
  parameter int W      = fc_pkg::W_W,
  parameter int THRESH = 0,
  parameter int NB     = $clog2(N),
  parameter int DIST_W = fc_pkg::W_FRAC + $clog2(N) + 1,
  parameter int T_W    = 3 * W + $clog2(N * N),
  parameter int KW_W   = W + $clog2(N),
  parameter int R_W    = fc_pkg::FR + 1,
  parameter int CPL_W  = DIST_W + fc_pkg::FR - fc_pkg::W_FRAC
) (
  input  logic              clk,
  input  logic              rst,
  // PLI matrix write port
  input  logic              m_we,
  input  logic [NB-1:0]     m_wi,
  input  logic [NB-1:0]     m_wj,
  input  logic [W-1:0]      m_wdata,
  // control
  input  logic              start,
  output logic              busy,
  output logic              done,
  // per-node degrees and triangle sum
  output logic              deg_valid,
  output logic [NB-1:0]     deg_node,
  output logic [NB-1:0]     deg_k,
  output logic [KW_W-1:0]   deg_kw,
  output logic [T_W-1:0]    tri_sum,
  // per-node clustering coefficient
  output logic              cc_valid,
  output logic [NB-1:0]     cc_node,
  output logic [R_W-1:0]    cc,
  // network results
  output logic [R_W-1:0]    cc_mean,
  output logic [R_W-1:0]    dens,
  output logic [R_W-1:0]    trans,
  output logic [CPL_W-1:0]  cpl,
  output logic [DIST_W-1:0] ecc [N],
  output logic [DIST_W-1:0] radius,
  output logic [DIST_W-1:0] diameter
);
  logic [NB-1:0] ri, rj, rk, row_sel;
  logic [W-1:0]  w_ij, w_ik, w_jk;
  logic [W-1:0]  row [N];

  pli_matrix_reg #(.N(N), .W(W)) u_mat (
    .clk, .rst, .we(m_we), .wi(m_wi), .wj(m_wj), .wdata(m_wdata),
    .ri, .rj, .rk, .w_ij, .w_ik, .w_jk, .row_sel, .row);

  logic cc_busy, deg_last, cc_last, mean_valid;
  clustering_coeff #(.N(N), .W(W), .THRESH(THRESH), .NB(NB), .T_W(T_W),
                     .KW_W(KW_W), .CC_W(R_W)) u_cc (
    .clk, .rst, .start, .busy(cc_busy), .ri, .rj, .rk, .w_ij, .w_ik, .w_jk,
    .deg_valid, .deg_last, .deg_node, .deg_k, .deg_kw, .t_out(tri_sum),
    .cc_valid, .cc_last, .cc_node, .cc, .mean_valid, .cc_mean);

  logic dens_valid;
  density #(.N(N), .NB(NB), .D_W(R_W)) u_dens (
    .clk, .rst, .deg_valid, .deg_last, .deg_node, .deg_k,
    .valid(dens_valid), .dens);

  logic trans_valid;
  transitivity #(.N(N), .W(W), .NB(NB), .T_W(T_W), .TR_W(R_W)) u_trans (
    .clk, .rst, .deg_valid, .deg_last, .deg_node, .deg_k, .t_in(tri_sum),
    .valid(trans_valid), .trans);

  logic              cpl_busy, fd_valid, fd_inf, fd_last, cpl_valid;
  logic [NB-1:0]     fd_src, fd_dst;
  logic [DIST_W-1:0] fd_dist;
  cpl_unit #(.N(N), .W(W), .DIST_W(DIST_W), .NB(NB), .CPL_W(CPL_W)) u_cpl (
    .clk, .rst, .start, .busy(cpl_busy), .row_sel, .row,
    .fd_valid, .fd_src, .fd_dst, .fd_dist, .fd_inf, .fd_last, .cpl_valid, .cpl);

  logic ecc_valid;
  ecc_rad_dia #(.N(N), .DIST_W(DIST_W), .NB(NB)) u_ecc (
    .clk, .rst, .clear(start && !busy), .fd_valid, .fd_src, .fd_dst, .fd_dist,
    .fd_inf, .fd_last, .valid(ecc_valid), .ecc, .radius, .diameter);

  // run bookkeeping: done when every result of this run has been produced
  logic got_mean, got_trans, got_dens;
  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; got_mean <= 1'b0; got_trans <= 1'b0; got_dens <= 1'b0;
    end else if (start && !busy) begin
      busy <= 1'b1; done <= 1'b0; got_mean <= 1'b0; got_trans <= 1'b0; got_dens <= 1'b0;
    end else if (busy) begin
      done <= 1'b0;
      if (mean_valid)  got_mean  <= 1'b1;
      if (trans_valid) got_trans <= 1'b1;
      if (dens_valid)  got_dens  <= 1'b1;
      if (got_mean && got_trans && got_dens && cpl_valid && ecc_valid &&
          !cc_busy && !cpl_busy) begin
        busy <= 1'b0; done <= 1'b1;
      end
    end else begin
      done <= 1'b0;
    end
  end
endmodule
