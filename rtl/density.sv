// density: network density from the degrees of the clustering-coefficient
// unit, D = (sum of k_i) / (N^2 - N).
//
// An accumulator sums the binary degree of each node as the clustering unit
// reports it, restarting at node 0, and the sum is multiplied by the
// precomputed constant 1/(N^2-N) (Q.16), so no divider is needed. This is the
// document's structure (accumulator with a clear multiplexer, register,
// constant multiplier). The rounding of the constant is this design's choice.
// Timing: the accumulator register updates one clock after deg_valid; the
// multiplier is combinational, so `valid` pulses one clock after the last
// node's degree (N*C(N-1,2)+2 clocks after the sweep starts).
module density #(
  parameter int N    = fc_pkg::N_CH,
  parameter int NB   = $clog2(N),
  parameter int D_W  = fc_pkg::FR + 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          deg_valid,
  input  logic          deg_last,
  input  logic [NB-1:0] deg_node,
  input  logic [NB-1:0] deg_k,
  output logic          valid,     // one-clock pulse: dens holds the final value
  output logic [D_W-1:0] dens      // Q.16
);
  import fc_pkg::*;
  localparam int INV_NN = recip_q16(N * N - N);
  localparam int ACC_W  = $clog2(N * N) + 1;

  logic [ACC_W-1:0] acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0; valid <= 1'b0;
    end else begin
      valid <= deg_valid && deg_last;
      if (deg_valid) acc <= ((deg_node == '0) ? '0 : acc) + ACC_W'(deg_k);
    end
  end

  assign dens = D_W'(((ACC_W + FR)'(acc) * (ACC_W + FR)'(INV_NN)));
endmodule
