// phase_calc: instantaneous phase of the analytic signal, computed by a bank
// of NUM iterative CORDIC units behind an input and an output selector.
//
// Each accepted sample (x, x~) goes to the next unit in round-robin order
// (input select); since all units take the same number of clocks, results
// come back in the same order and the output selector simply follows a
// second round-robin pointer. With NUM = ITER units the bank accepts one
// sample per clock.
// Interface: valid/ready on the input; out_valid pulses with out_phase
// (signed Q3.12 radians) and cannot be stalled. out_valid rises ITER clocks
// after the edge that accepts the sample.
// The bank of CORDICs with input and output select follows the document's
// PLI architecture figure; the round-robin policy and NUM are this design's
// choices (the figure leaves the number of units open).
module phase_calc #(
  parameter int XW   = 24,
  parameter int PH_W = fc_pkg::PH_W,
  parameter int ITER = 16,
  parameter int NUM  = 16
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [XW-1:0]   in_x,
  input  logic signed [XW-1:0]   in_y,
  output logic                   out_valid,
  output logic signed [PH_W-1:0] out_phase
);
  localparam int RB = (NUM > 1) ? $clog2(NUM) : 1;

  logic [RB-1:0]         rr_in, rr_out;
  logic [NUM-1:0]        u_ready, u_done, u_start;
  logic signed [PH_W-1:0] u_phase [NUM];

  for (genvar u = 0; u < NUM; u++) begin : g_cordic
    assign u_start[u] = in_valid && (rr_in == RB'(u)) && u_ready[u];
    cordic_atan2 #(.XW(XW), .PH_W(PH_W), .ITER(ITER)) u_cordic (
      .clk, .rst, .start(u_start[u]), .x(in_x), .y(in_y),
      .ready(u_ready[u]), .done(u_done[u]), .phase(u_phase[u]));
  end

  assign in_ready  = u_ready[rr_in];
  assign out_valid = u_done[rr_out];
  assign out_phase = u_phase[rr_out];

  always_ff @(posedge clk) begin
    if (rst) begin
      rr_in <= '0; rr_out <= '0;
    end else begin
      if (in_valid && in_ready)
        rr_in <= (rr_in == RB'(NUM - 1)) ? '0 : rr_in + 1'b1;
      if (out_valid)
        rr_out <= (rr_out == RB'(NUM - 1)) ? '0 : rr_out + 1'b1;
    end
  end
endmodule
