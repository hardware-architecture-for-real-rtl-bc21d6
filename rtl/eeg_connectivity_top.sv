// eeg_connectivity_top: real-time functional brain connectivity from
// N-channel EEG. One window of L samples per channel goes in; the Phase Lag
// Index matrix and its graph-theoretic parameters come out.
//
// pli_unit computes the C(N,2) PLI values and writes them into the matrix
// register of graph_connectivity; when the last value is written the graph
// system is started and, about N*C(N-1,2)+9 clocks later, holds degree,
// weighted degree and clustering coefficient of every node, mean clustering
// coefficient, density, transitivity, characteristic path length,
// eccentricities, radius and diameter. `done` pulses when all are valid.
// With N = 19 and L = 128 the PLI matrix is complete 5,657 clocks after the
// last sample of a window and `done` follows 8,573 clocks after it (0.39 ms
// at 22.16 MHz, inside the document's 0.5 ms budget for connectivity and
// graph parameters). The EEG input is channel-major: all L samples of
// channel 0, then channel 1, and so on; eeg_ready drops while a channel is
// being transformed.
// The PLI matrix writes are also brought out (m_*) for observation.
// A new window may be sent as soon as the PLI unit has finished the previous
// one; its results replace the previous ones when it completes.
// The split into a PLI calculation system and a graph connectivity system
// follows the document's block diagram.
module eeg_connectivity_top #(
  parameter int N      = fc_pkg::N_CH,
  parameter int L      = fc_pkg::WIN_L,
  parameter int IN_W   = fc_pkg::EEG_W,
  parameter int W      = fc_pkg::W_W,
  parameter int NB     = $clog2(N),
  parameter int DIST_W = fc_pkg::W_FRAC + $clog2(N) + 1,
  parameter int T_W    = 3 * W + $clog2(N * N),
  parameter int KW_W   = W + $clog2(N),
  parameter int R_W    = fc_pkg::FR + 1,
  parameter int CPL_W  = DIST_W + fc_pkg::FR - fc_pkg::W_FRAC
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   eeg_valid,
  output logic                   eeg_ready,
  input  logic signed [IN_W-1:0] eeg_data,
  // PLI matrix writes
  output logic                   m_we,
  output logic [NB-1:0]          m_wi,
  output logic [NB-1:0]          m_wj,
  output logic [W-1:0]           m_wdata,
  // per-node results
  output logic                   deg_valid,
  output logic [NB-1:0]          deg_node,
  output logic [NB-1:0]          deg_k,
  output logic [KW_W-1:0]        deg_kw,
  output logic [T_W-1:0]         tri_sum,     // triangle sum t_i (Q.21)
  output logic                   cc_valid,
  output logic [NB-1:0]          cc_node,
  output logic [R_W-1:0]         cc,
  // network results
  output logic                   busy,
  output logic                   done,
  output logic [R_W-1:0]         cc_mean,
  output logic [R_W-1:0]         dens,
  output logic [R_W-1:0]         trans,
  output logic [CPL_W-1:0]       cpl,
  output logic [DIST_W-1:0]      ecc [N],
  output logic [DIST_W-1:0]      radius,
  output logic [DIST_W-1:0]      diameter
);
  logic pli_busy, pli_done, g_busy;

  assign busy = pli_busy || g_busy;

  pli_unit #(.N(N), .L(L), .IN_W(IN_W), .W(W), .NB(NB)) u_pli (
    .clk, .rst, .eeg_valid, .eeg_ready, .eeg_data,
    .m_we, .m_wi, .m_wj, .m_wdata, .busy(pli_busy), .done(pli_done));

  graph_connectivity #(.N(N), .W(W), .NB(NB), .DIST_W(DIST_W), .T_W(T_W),
                       .KW_W(KW_W), .R_W(R_W), .CPL_W(CPL_W)) u_graph (
    .clk, .rst, .m_we, .m_wi, .m_wj, .m_wdata, .start(pli_done),
    .busy(g_busy), .done, .deg_valid, .deg_node, .deg_k, .deg_kw, .tri_sum,
    .cc_valid, .cc_node, .cc, .cc_mean, .dens, .trans, .cpl, .ecc, .radius,
    .diameter);
endmodule
