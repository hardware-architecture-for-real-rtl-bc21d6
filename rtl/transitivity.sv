// transitivity: T = (sum of 2 t_i) / (sum of k_i (k_i - 1)).
//
// Reuses the triangle sums t_i and degrees k_i of the clustering-coefficient
// unit: one accumulator for the numerator, a multiplier k(k-1) and an
// accumulator for the denominator, and one final division, as the document's
// transitivity diagram shows. Both accumulators restart at node 0.
// Formats: t_i Q.21 in, T Q.16 out (0 when the denominator is 0).
// Timing: multiplier and numerator register one clock after deg_valid, the
// denominator register one clock later, then the three-stage divider: `valid`
// pulses N*C(N-1,2)+6 clocks after the sweep starts, as in the document's
// cycle table. Register placement is this design's choice.
module transitivity #(
  parameter int N    = fc_pkg::N_CH,
  parameter int W    = fc_pkg::W_W,
  parameter int NB   = $clog2(N),
  parameter int T_W  = 3 * W + $clog2(N * N),
  parameter int TR_W = fc_pkg::FR + 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            deg_valid,
  input  logic            deg_last,
  input  logic [NB-1:0]   deg_node,
  input  logic [NB-1:0]   deg_k,
  input  logic [T_W-1:0]  t_in,
  output logic            valid,
  output logic [TR_W-1:0] trans
);
  import fc_pkg::*;
  localparam int NUM_W = T_W + 1 + NB;
  localparam int KK_W  = 2 * NB;
  localparam int DEN_W = KK_W + NB;

  logic [NUM_W-1:0] num_acc;
  logic [KK_W-1:0]  kk;
  logic             v2, first2, last2, last3;
  logic [DEN_W-1:0] den_acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      num_acc <= '0; kk <= '0; v2 <= 1'b0; first2 <= 1'b0; last2 <= 1'b0;
      den_acc <= '0; last3 <= 1'b0;
    end else begin
      v2     <= deg_valid;
      first2 <= deg_node == '0;
      last2  <= deg_valid && deg_last;
      if (deg_valid) begin
        num_acc <= ((deg_node == '0) ? '0 : num_acc) + NUM_W'({t_in, 1'b0});
        kk      <= KK_W'(deg_k) * KK_W'(deg_k - ((deg_k != '0) ? KK_W'(1) : KK_W'(0)));
      end
      last3 <= last2;
      if (v2) den_acc <= (first2 ? '0 : den_acc) + DEN_W'(kk);
    end
  end

  logic [NUM_W-1:0] q;
  pipe_div #(.NUM_W(NUM_W), .DEN_W(DEN_W), .LAT(3)) u_div (
    .clk, .rst, .in_valid(last3), .num(num_acc), .den(den_acc),
    .out_valid(valid), .q);

  assign trans = TR_W'(q >> (3 * W_FRAC - FR));
endmodule
