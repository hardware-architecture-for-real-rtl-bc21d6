// geometric_mean: triangle multiply-accumulate of the clustering coefficient.
//
// For node i the sweep presents, one per clock, every pair (j, k), j < k, of
// the other nodes together with the three weights of triangle (i, j, k).
// The unit multiplies w(i,j) * w(i,k) * w(j,k) and accumulates the products,
// giving t_i = sum over j<k of w_ij w_ik w_jk. Leaving out the cube root of the
// textbook geometric mean, and using only the upper triangle (j < k), follow
// the document's simplification; the sum over unordered pairs equals the
// document's half sum over ordered pairs.
// Timing: when `en` is high the product is added at the clock edge; `first`
// marks the first pair of a node and loads the product instead of adding it.
// Format: weights Q1.7, product Q3.21, accumulator Q.21 in ACC_W bits.
module geometric_mean #(
  parameter int W     = fc_pkg::W_W,
  parameter int ACC_W = 30
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             first,
  input  logic [W-1:0]     w_ij,
  input  logic [W-1:0]     w_ik,
  input  logic [W-1:0]     w_jk,
  output logic [ACC_W-1:0] t_acc
);
  logic [3*W-1:0] prod;
  assign prod = w_ij * w_ik * w_jk;

  always_ff @(posedge clk) begin
    if (rst)       t_acc <= '0;
    else if (en)   t_acc <= (first ? '0 : t_acc) + ACC_W'(prod);
  end
endmodule
