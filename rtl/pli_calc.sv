// pli_calc: Phase Lag Index of one reference channel against up to LANES
// other channels at once, over a window of L samples:
//   PLI = | (1/L) * sum_l sign(phi_ref(l) - phi(l)) |.
//
// The reference channel's L phases are first pushed into a FIFO (`load`,
// data on ref_in). Then the other channels stream their L phases together
// (`calc`, one phase per lane on lane_in); for every sample the FIFO output
// is written back into it through the input select, so the reference window
// is kept for a further pass. Each lane has its own datapath:
//   d = phi_ref - phi                         (subtractor)
//   p = pi - |d|                              (ABS, subtract from pi)
//   s = sign(d * p)                           (multiplier, sign)
//   acc += s                                  (accumulator)
// The factor p flips the sign when |d| exceeds pi, which is the sign of the
// phase difference wrapped into (-pi, pi]. After L samples every lane
// outputs |acc| as a Q1.7 weight (|acc| * 128 / L) and restarts.
// Timing: three register stages; out_valid rises on the second clock edge
// after the edge that takes the L-th calc sample, and out_pli holds its
// values until the next pulse.
// Phases are signed Q3.12 radians. `wrap` is high for a clock when some
// lane's difference exceeded pi.
// The FIFO, input select, ABS, pi subtraction, D flip-flops, multiplier, sign
// and accumulator follow the document's PLI datapath. Replicating that
// datapath in lanes behind one shared reference FIFO, so that all pairs of a
// reference channel are computed in one pass, is this design's choice, made
// to fit the document's sub-millisecond budget; so are the pipeline
// placement and the number formats. Lanes whose input is unused simply
// compute a value that is not read.
module pli_calc #(
  parameter int L     = fc_pkg::WIN_L,
  parameter int LANES = fc_pkg::N_CH - 1,
  parameter int PH_W  = fc_pkg::PH_W,
  parameter int W     = fc_pkg::W_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   load,               // push a reference phase
  input  logic                   calc,               // one sample of every lane
  input  logic signed [PH_W-1:0] ref_in,
  input  logic signed [PH_W-1:0] lane_in [LANES],
  output logic                   out_valid,
  output logic [W-1:0]           out_pli [LANES],
  output logic                   wrap                // some lane's |d| exceeded pi
);
  localparam int LB    = $clog2(L);
  localparam int DW    = PH_W + 1;
  localparam int ACC_W = LB + 2;
  localparam logic signed [DW-1:0] PI = DW'(fc_pkg::PH_PI);

  // reference FIFO: circular buffer, written on load, recirculated on calc
  logic signed [PH_W-1:0] fifo [L];
  logic [LB-1:0]          ptr;
  logic signed [PH_W-1:0] ref_ph;
  assign ref_ph = fifo[ptr];

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
      for (int a = 0; a < L; a++) fifo[a] <= '0;
    end else if (load || calc) begin
      fifo[ptr] <= load ? ref_in : ref_ph;   // input select
      ptr       <= ptr + 1'b1;
    end
  end

  // sample counter of the calc stream
  logic [LB-1:0] n;
  always_ff @(posedge clk) begin
    if (rst)       n <= '0;
    else if (load) n <= '0;
    else if (calc) n <= n + 1'b1;
  end

  // control, shared by all lanes
  logic v1, first1, last1, v2, first2, last2;
  always_ff @(posedge clk) begin
    if (rst) begin
      v1 <= 1'b0; first1 <= 1'b0; last1 <= 1'b0;
      v2 <= 1'b0; first2 <= 1'b0; last2 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1     <= calc;
      first1 <= calc && (n == '0);
      last1  <= calc && (n == LB'(L - 1));
      v2 <= v1; first2 <= first1; last2 <= last1;
      out_valid <= v2 && last2;
    end
  end

  logic [LANES-1:0] wrap_l;

  for (genvar g = 0; g < LANES; g++) begin : g_lane
    // stage 1: difference and its magnitude; stage 2: pi - |d|
    logic signed [DW-1:0]    d0, d1, a1, d2, p2;
    logic signed [2*DW-1:0]  prod;
    logic signed [ACC_W-1:0] acc, sgn, acc_next;
    logic [ACC_W-1:0]        mag;

    always_comb begin
      d0       = DW'(ref_ph) - DW'(lane_in[g]);
      prod     = d2 * p2;
      sgn      = (prod > 0) ? ACC_W'(1) : ((prod < 0) ? -ACC_W'(1) : '0);
      acc_next = (first2 ? '0 : acc) + sgn;
      mag      = (acc_next < 0) ? ACC_W'(-acc_next) : ACC_W'(acc_next);
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        d1 <= '0; a1 <= '0; d2 <= '0; p2 <= '0; acc <= '0;
        out_pli[g] <= '0; wrap_l[g] <= 1'b0;
      end else begin
        d1 <= d0;
        a1 <= (d0 < 0) ? -d0 : d0;
        d2 <= d1;
        p2 <= PI - a1;
        wrap_l[g] <= v1 && (a1 > PI);
        if (v2) acc <= acc_next;
        if (v2 && last2)
          out_pli[g] <= W'((32'(mag) << fc_pkg::W_FRAC) / L);
      end
    end
  end

  assign wrap = |wrap_l;
endmodule
