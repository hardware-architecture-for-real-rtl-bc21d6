// tb_pli_calc: loads a random reference window into the FIFO, then streams
// four other channels through the four lanes at once, twice per reference
// (the second pass uses the recirculated FIFO contents). The expected PLI is
// worked out here by wrapping each phase difference into (-pi, pi] and
// counting signs: |sum sign| * 128 / L. Channel types: random phases, a
// constant lag (PLI 1), the reference itself (PLI 0) and lags near +-pi
// (wrap-around); the types rotate over the lanes from pass to pass.
// Also checks that out_valid rises two clock edges after the edge that
// takes the last sample.
module tb_pli_calc;
  localparam int L = 128, LANES = 4;
  localparam int PI_Q = 12868, TWO_PI_Q = 25736;
  logic clk = 0, rst = 1, load = 0, calc = 0, out_valid, wrap;
  logic signed [15:0] ref_in;
  logic signed [15:0] lane_in [LANES];
  logic [7:0] out_pli [LANES];
  int checks = 0, failures = 0, cyc = 0, wraps = 0;
  int refw [L];
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (!rst && wrap) wraps++;
  pli_calc #(.L(L), .LANES(LANES)) dut (.*);

  function automatic int rand_phase();
    return int'($urandom % (2 * PI_Q + 1)) - PI_Q;
  endfunction

  function automatic int wrapc(input int p);
    while (p > PI_Q) p -= TWO_PI_Q;
    while (p <= -PI_Q) p += TWO_PI_Q;
    return p;
  endfunction

  task automatic pass(input int rot);
    int s [LANES];
    int ph, d, t_last, e, kind;
    for (int g = 0; g < LANES; g++) s[g] = 0;
    for (int l = 0; l < L; l++) begin
      @(negedge clk); calc = 1;
      for (int g = 0; g < LANES; g++) begin
        kind = (g + rot) % 4;
        case (kind)
          0: ph = rand_phase();
          1: ph = wrapc(refw[l] - 3000);
          2: ph = refw[l];
          default: ph = wrapc(refw[l] + PI_Q - 200 + int'($urandom % 400));
        endcase
        d = wrapc(refw[l] - ph);
        if (d > 0 && d != PI_Q) s[g]++;
        else if (d < 0) s[g]--;
        lane_in[g] = 16'(ph);
      end
    end
    @(posedge clk); #1 t_last = cyc;
    @(negedge clk); calc = 0;
    while (!out_valid) begin @(posedge clk); #1; end
    checks++;
    if (cyc - t_last != 2) begin failures++; $display("FAIL latency %0d", cyc - t_last); end
    for (int g = 0; g < LANES; g++) begin
      e = ((s[g] < 0) ? -s[g] : s[g]) * 128 / L;
      checks++;
      if (out_pli[g] != 8'(e)) begin
        failures++; $display("FAIL lane %0d type %0d pli %0d expected %0d", g, (g + rot) % 4, out_pli[g], e);
      end
    end
  endtask

  initial begin
    for (int g = 0; g < LANES; g++) lane_in[g] = '0;
    ref_in = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int rep = 0; rep < 8; rep++) begin
      for (int l = 0; l < L; l++) begin
        refw[l] = rand_phase();
        @(negedge clk); load = 1; ref_in = 16'(refw[l]);
      end
      @(negedge clk); load = 0;
      pass(rep); pass(rep + 1);
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
