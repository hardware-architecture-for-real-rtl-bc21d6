// cpl_unit: characteristic path length by Dijkstra's algorithm on N parallel
// shortest path finding units.
//
// For each source s = 0..N-1 the unit runs N steps, one per clock. Step 0
// makes s the current node at distance 0 and loads every SPFU with its direct
// edge length from s (init). Each later step lets the minimum finding unit
// pick the unvisited node k with the smallest tentative distance, marks it
// visited and lets every unvisited SPFU relax through k, reading the PLI row
// of k from the matrix register. After the N steps the N distances d(s, j)
// are copied into a parallel-to-serial register and shifted out, one per
// clock, while the next source is already being processed. The serial stream
// feeds an accumulator (finite distances, j != s) whose sum is multiplied by
// the precomputed 1/(N^2-N) and is also given to the eccentricity unit.
// Interface: `start` pulse, combinational matrix row port (row_sel / row),
// serial distance stream fd_*, and cpl (Q.16) with cpl_valid.
// Timing: N*N step clocks plus N clocks to drain the last source plus one:
// cpl_valid rises N^2+N+1 clocks after the edge that samples `start`, as in
// the document's cycle table.
// The SPFU array, minimum finding unit, parallel-to-serial register,
// accumulator and constant multiplier follow the document's diagram. Leaving
// infinite distances (no path) out of the sum while still dividing by N^2-N
// is this design's reading.
module cpl_unit #(
  parameter int N      = fc_pkg::N_CH,
  parameter int W      = fc_pkg::W_W,
  parameter int DIST_W = fc_pkg::W_FRAC + $clog2(fc_pkg::N_CH) + 1,
  parameter int NB     = $clog2(N),
  parameter int CPL_W  = DIST_W + fc_pkg::FR - fc_pkg::W_FRAC
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  output logic              busy,
  output logic [NB-1:0]     row_sel,
  input  logic [W-1:0]      row [N],
  // serial stream of final distances d(fd_src, fd_dst)
  output logic              fd_valid,
  output logic [NB-1:0]     fd_src,
  output logic [NB-1:0]     fd_dst,
  output logic [DIST_W-1:0] fd_dist,
  output logic              fd_inf,
  output logic              fd_last,
  output logic              cpl_valid,
  output logic [CPL_W-1:0]  cpl      // Q.16
);
  import fc_pkg::*;
  localparam int INV_NN = recip_q16(N * N - N);
  localparam int ACC_W  = DIST_W + $clog2(N * N);

  logic [NB-1:0]     s_q, c_q;
  logic [N-1:0]      visited;
  logic              fin_q;

  // SPFU array
  logic [DIST_W-1:0] sp_dist [N];
  logic              sp_inf  [N];
  logic [N-1:0]      sp_en;
  logic              init;
  logic [NB-1:0]     cur;
  logic [DIST_W-1:0] cur_dist;
  logic              cur_inf;

  // minimum finding unit
  logic              mf_found;
  logic [NB-1:0]     mf_idx;
  logic [DIST_W-1:0] mf_dist;
  logic              mf_inf;

  min_finder #(.N(N), .DIST_W(DIST_W), .NB(NB)) u_mf (
    .dists(sp_dist), .infs(sp_inf), .visited, .found(mf_found), .idx(mf_idx),
    .min_dist(mf_dist), .min_inf(mf_inf));

  always_comb begin
    init = (c_q == '0);
    if (init) begin
      cur = s_q; cur_dist = '0; cur_inf = 1'b0;
    end else begin
      cur = mf_idx; cur_dist = mf_dist; cur_inf = mf_inf || !mf_found;
    end
    row_sel = cur;
    for (int j = 0; j < N; j++) sp_en[j] = busy && (init || !visited[j]);
  end

  for (genvar j = 0; j < N; j++) begin : g_spfu
    spfu #(.W(W), .DIST_W(DIST_W)) u_spfu (
      .clk, .rst, .en(sp_en[j]), .init, .pli(row[j]), .cur_dist, .cur_inf,
      .min_dist(sp_dist[j]), .min_inf(sp_inf[j]));
  end

  // step / source control
  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; s_q <= '0; c_q <= '0; visited <= '0; fin_q <= 1'b0;
    end else begin
      fin_q <= busy && (s_q == NB'(N - 1)) && (c_q == NB'(N - 1));
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; s_q <= '0; c_q <= '0;
        end
      end else begin
        visited <= (init ? '0 : visited) | (N'(1) << cur);
        if (c_q == NB'(N - 1)) begin
          c_q <= '0;
          if (s_q == NB'(N - 1)) busy <= 1'b0;
          else                   s_q  <= s_q + 1'b1;
        end else begin
          c_q <= c_q + 1'b1;
        end
      end
    end
  end

  // parallel-to-serial register
  logic              p2s_load, p2s_act;
  logic [NB-1:0]     p2s_src, p2s_cnt;
  logic [DIST_W-1:0] p2s_d   [N];
  logic [N-1:0]      p2s_inf;

  assign p2s_load = (busy && init && (s_q != '0)) || fin_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      p2s_act <= 1'b0; p2s_src <= '0; p2s_cnt <= '0; p2s_inf <= '0;
      for (int j = 0; j < N; j++) p2s_d[j] <= '0;
    end else if (p2s_load) begin
      p2s_act <= 1'b1;
      p2s_cnt <= '0;
      p2s_src <= fin_q ? NB'(N - 1) : s_q - 1'b1;
      for (int j = 0; j < N; j++) begin
        p2s_d[j]   <= sp_dist[j];
        p2s_inf[j] <= sp_inf[j];
      end
    end else if (p2s_act) begin
      if (p2s_cnt == NB'(N - 1)) p2s_act <= 1'b0;
      else                       p2s_cnt <= p2s_cnt + 1'b1;
    end
  end

  assign fd_valid = p2s_act;
  assign fd_src   = p2s_src;
  assign fd_dst   = p2s_cnt;
  assign fd_dist  = p2s_d[p2s_cnt];
  assign fd_inf   = p2s_inf[p2s_cnt];
  assign fd_last  = p2s_act && (p2s_cnt == NB'(N - 1)) && (p2s_src == NB'(N - 1));

  // accumulator and 1/(N^2-N) multiplier
  logic [ACC_W-1:0] acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0; cpl_valid <= 1'b0;
    end else if (start && !busy) begin
      acc <= '0; cpl_valid <= 1'b0;
    end else if (fd_valid) begin
      if (!fd_inf && (fd_dst != fd_src)) acc <= acc + ACC_W'(fd_dist);
      if (fd_last) cpl_valid <= 1'b1;
    end
  end

  assign cpl = CPL_W'(((ACC_W + FR)'(acc) * (ACC_W + FR)'(INV_NN)) >> W_FRAC);
endmodule
