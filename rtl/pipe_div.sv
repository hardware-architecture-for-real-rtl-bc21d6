// pipe_div: unsigned divider with a fixed pipeline latency.
//
// q = num / den, or 0 when den is 0 (a node with fewer than two neighbours has
// no clustering coefficient; it is reported as 0). The quotient is formed in
// the first stage and then carried through LAT-1 more registers, which a
// synthesis tool may retime into the division logic. in_valid travels with
// the data, so out_valid is in_valid delayed by LAT clocks.
module pipe_div #(
  parameter int NUM_W = 32,
  parameter int DEN_W = 16,
  parameter int LAT   = 3
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             out_valid,
  output logic [NUM_W-1:0] q
);
  logic [NUM_W-1:0] qp [LAT];
  logic [LAT-1:0]   vp;

  always_ff @(posedge clk) begin
    if (rst) begin
      vp <= '0;
      for (int s = 0; s < LAT; s++) qp[s] <= '0;
    end else begin
      vp[0] <= in_valid;
      qp[0] <= (den == '0) ? '0 : num / NUM_W'(den);
      for (int s = 1; s < LAT; s++) begin
        vp[s] <= vp[s-1];
        qp[s] <= qp[s-1];
      end
    end
  end

  assign out_valid = vp[LAT-1];
  assign q         = qp[LAT-1];
endmodule
