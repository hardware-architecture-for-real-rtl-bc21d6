// degree_unit: binary and weighted degree, computed during the triangle sweep.
//
// The triangle sweep for node i visits every other node, so the degree needs
// no pass of its own. In the pair order of the sweep (rows j, columns k > j)
// the unit adds edge (i, j) on the first pair of each row (`new_row`) and, in
// the last row, also edge (i, k): together that is every edge of node i once.
// The binary degree counts edges whose weight exceeds THRESH; the weighted
// degree adds the weights. Reusing the sweep follows the document; the
// new-row rule for picking each edge exactly once is this design's reading.
// Timing: accumulates at the clock edge when `en` is high; `first` (first pair
// of the node) restarts both sums.
module degree_unit #(
  parameter int N      = fc_pkg::N_CH,
  parameter int W      = fc_pkg::W_W,
  parameter int THRESH = 0,
  parameter int K_W    = $clog2(N),
  parameter int KW_W   = W + $clog2(N)
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  logic            first,
  input  logic            new_row,
  input  logic            last_row,
  input  logic [W-1:0]    w_ij,
  input  logic [W-1:0]    w_ik,
  output logic [K_W-1:0]  k_acc,
  output logic [KW_W-1:0] kw_acc
);
  logic        take_j, take_k;
  logic [1:0]  dk;
  logic [W:0]  dw;

  always_comb begin
    take_j = new_row;
    take_k = last_row;
    dk = 2'((take_j && (int'(w_ij) > THRESH)) ? 1 : 0)
       + 2'((take_k && (int'(w_ik) > THRESH)) ? 1 : 0);
    dw = (take_j ? (W+1)'(w_ij) : '0) + (take_k ? (W+1)'(w_ik) : '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      k_acc  <= '0;
      kw_acc <= '0;
    end else if (en) begin
      k_acc  <= (first ? '0 : k_acc)  + K_W'(dk);
      kw_acc <= (first ? '0 : kw_acc) + KW_W'(dw);
    end
  end
endmodule
