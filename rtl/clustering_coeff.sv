// clustering_coeff: the core graph unit. It sweeps all triangles and gives the
// triangle sums t_i, the binary and weighted degree and the clustering
// coefficient of every node, and the mean clustering coefficient.
//
// Sweep: for node i = 0..N-1 and every pair (j, k), j < k, of the other N-1
// nodes, one pair per clock: N * C(N-1, 2) clocks in all. Each clock the PLI
// matrix register returns w(i,j), w(i,k), w(j,k); geometric_mean accumulates
// their product and degree_unit the degrees. When a node is finished its sums
// are registered (degree output), k(k-1) is formed, 2 t_i is divided by it
// (pipe_div) to give CC_i, and the CC_i are summed and multiplied by the
// precomputed 1/N to give the mean.
// Interface: `start` (one clock, ignored while busy) begins a sweep. Per node,
// `deg_valid` pulses with deg_node/deg_k/deg_kw/t_out (t_out = t_i, Q.21);
// `cc_valid` pulses with cc_node/cc (Q.16); `mean_valid` pulses with cc_mean
// (Q.16) once at the end. `deg_last`/`cc_last` flag the last node.
// Timing, counted in clocks from the edge that samples `start`: last degree
// N*C(N-1,2)+1, mean clustering coefficient N*C(N-1,2)+7, as in the
// document's cycle table; the divider latency (3) is chosen to give that
// count. Dropping the cube root (3.2 of the document) and reusing the sweep
// for the degree follow the document; widths and the pair order are this
// design's choices.
module clustering_coeff #(
  parameter int N      = fc_pkg::N_CH,
  parameter int W      = fc_pkg::W_W,
  parameter int THRESH = 0,
  parameter int NB     = $clog2(N),
  parameter int T_W    = 3 * W + $clog2(N * N),  // Q.21 triangle sum
  parameter int KW_W   = W + $clog2(N),
  parameter int CC_W   = fc_pkg::FR + 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  output logic            busy,
  // triangle read port of the PLI matrix register
  output logic [NB-1:0]   ri,
  output logic [NB-1:0]   rj,
  output logic [NB-1:0]   rk,
  input  logic [W-1:0]    w_ij,
  input  logic [W-1:0]    w_ik,
  input  logic [W-1:0]    w_jk,
  // per-node degree and triangle sum
  output logic            deg_valid,
  output logic            deg_last,
  output logic [NB-1:0]   deg_node,
  output logic [NB-1:0]   deg_k,
  output logic [KW_W-1:0] deg_kw,
  output logic [T_W-1:0]  t_out,
  // per-node clustering coefficient and its mean
  output logic            cc_valid,
  output logic            cc_last,
  output logic [NB-1:0]   cc_node,
  output logic [CC_W-1:0] cc,
  output logic            mean_valid,
  output logic [CC_W-1:0] cc_mean
);
  import fc_pkg::*;
  localparam int INV_N = recip_q16(N);
  localparam int KK_W  = 2 * NB;
  localparam int SUM_W = CC_W + NB;

  // ---------------- sweep control ----------------
  logic [NB-1:0] i_q, a_q, b_q;   // node and pair (a < b) among the other nodes
  logic          first, new_row, last_row, last_pair;

  function automatic logic [NB-1:0] other(input logic [NB-1:0] x, input logic [NB-1:0] i);
    return (x < i) ? x : x + 1'b1;
  endfunction

  always_comb begin
    first     = (a_q == '0) && (b_q == NB'(1));
    new_row   = (b_q == a_q + 1'b1);
    last_row  = (a_q == NB'(N - 3));
    last_pair = last_row && (b_q == NB'(N - 2));
    ri = i_q;
    rj = other(a_q, i_q);
    rk = other(b_q, i_q);
  end

  logic          node_end_q;
  logic [NB-1:0] node_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; i_q <= '0; a_q <= '0; b_q <= NB'(1);
      node_end_q <= 1'b0; node_q <= '0;
    end else begin
      node_end_q <= busy && last_pair;
      node_q     <= i_q;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1; i_q <= '0; a_q <= '0; b_q <= NB'(1);
        end
      end else if (last_pair) begin
        a_q <= '0; b_q <= NB'(1);
        if (i_q == NB'(N - 1)) busy <= 1'b0;
        else                   i_q  <= i_q + 1'b1;
      end else if (b_q == NB'(N - 2)) begin
        a_q <= a_q + 1'b1; b_q <= a_q + NB'(2);
      end else begin
        b_q <= b_q + 1'b1;
      end
    end
  end

  // ---------------- geometric mean and degrees ----------------
  logic [T_W-1:0]  t_acc;
  logic [NB-1:0]   k_acc;
  logic [KW_W-1:0] kw_acc;

  geometric_mean #(.W(W), .ACC_W(T_W)) u_gm (
    .clk, .rst, .en(busy), .first, .w_ij, .w_ik, .w_jk, .t_acc);

  degree_unit #(.N(N), .W(W), .THRESH(THRESH), .K_W(NB), .KW_W(KW_W)) u_deg (
    .clk, .rst, .en(busy), .first, .new_row, .last_row, .w_ij, .w_ik,
    .k_acc, .kw_acc);

  // stage 1: node results
  always_ff @(posedge clk) begin
    if (rst) begin
      deg_valid <= 1'b0; deg_last <= 1'b0; deg_node <= '0;
      deg_k <= '0; deg_kw <= '0; t_out <= '0;
    end else begin
      deg_valid <= node_end_q;
      deg_last  <= node_end_q && (node_q == NB'(N - 1));
      if (node_end_q) begin
        deg_node <= node_q; deg_k <= k_acc; deg_kw <= kw_acc; t_out <= t_acc;
      end
    end
  end

  // stage 2: k(k-1) and 2 t_i
  logic            v2, last2;
  logic [NB-1:0]   node2;
  logic [KK_W-1:0] kk2;
  logic [T_W:0]    num2;
  always_ff @(posedge clk) begin
    if (rst) begin
      v2 <= 1'b0; last2 <= 1'b0; node2 <= '0; kk2 <= '0; num2 <= '0;
    end else begin
      v2 <= deg_valid; last2 <= deg_last;
      if (deg_valid) begin
        node2 <= deg_node;
        kk2   <= KK_W'(deg_k) * KK_W'(deg_k - ((deg_k != '0) ? KK_W'(1) : KK_W'(0)));
        num2  <= {t_out, 1'b0};
      end
    end
  end

  // stages 3..5: divider, result in Q.21, reported in Q.16
  logic           dv;
  logic [T_W:0]   dq;
  logic [NB-1:0]  node_p [3];
  logic [2:0]     last_p;
  pipe_div #(.NUM_W(T_W + 1), .DEN_W(KK_W), .LAT(3)) u_div (
    .clk, .rst, .in_valid(v2), .num(num2), .den(kk2), .out_valid(dv), .q(dq));

  always_ff @(posedge clk) begin
    if (rst) begin
      last_p <= '0;
      for (int s = 0; s < 3; s++) node_p[s] <= '0;
    end else begin
      last_p    <= {last_p[1:0], last2};
      node_p[0] <= node2;
      node_p[1] <= node_p[0];
      node_p[2] <= node_p[1];
    end
  end

  assign cc_valid = dv;
  assign cc_last  = last_p[2];
  assign cc_node  = node_p[2];
  assign cc       = CC_W'(dq >> (3 * W_FRAC - FR));

  // stages 6..7: mean = (sum of CC_i) * 1/N
  logic [SUM_W-1:0] sum_q;
  logic             sum_done;
  always_ff @(posedge clk) begin
    if (rst) begin
      sum_q <= '0; sum_done <= 1'b0; mean_valid <= 1'b0; cc_mean <= '0;
    end else begin
      sum_done <= cc_valid && cc_last;
      if (cc_valid) sum_q <= ((cc_node == '0) ? '0 : sum_q) + SUM_W'(cc);
      mean_valid <= sum_done;
      if (sum_done) cc_mean <= CC_W'(((SUM_W+FR)'(sum_q) * (SUM_W+FR)'(INV_N)) >> FR);
    end
  end
endmodule
