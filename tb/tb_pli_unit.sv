// tb_pli_unit: a 6-channel, 128-sample window of two-tone signals with known
// phases goes through the PLI unit. Checks that all C(6,2) pairs are written
// once, in order (0,1), (0,2), ... (4,5), that every PLI is within 4/128 of
// the value computed here from the closed-form phases, that a repeated
// channel gives PLI 0, and that `done` pulses once after the last pair.
module tb_pli_unit;
  localparam int N = 6, L = 128, NB = 3, TOL = 4;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1, eeg_valid = 0, eeg_ready, m_we, busy, done;
  logic signed [15:0] eeg_data;
  logic [NB-1:0] m_wi, m_wj;
  logic [7:0] m_wdata;
  int checks = 0, failures = 0, nwr = 0, ndone = 0;
  int ei, ej;
  real ph1 [N], ph2 [N];
  always #5 clk = ~clk;
  pli_unit #(.N(N), .L(L)) dut (.*);

  function automatic int src(input int c);
    return (c == N - 1) ? 0 : c;   // the last channel repeats channel 0
  endfunction

  function automatic real phase_of(input int c, input int t);
    real re, im;
    re = 9000.0 * $cos(2.0 * PI * 7 * t / L + ph1[src(c)]) + 4000.0 * $cos(2.0 * PI * 13 * t / L + ph2[src(c)]);
    im = 9000.0 * $sin(2.0 * PI * 7 * t / L + ph1[src(c)]) + 4000.0 * $sin(2.0 * PI * 13 * t / L + ph2[src(c)]);
    return $atan2(im, re);
  endfunction

  function automatic int exp_pli(input int i, input int j);
    int s = 0;
    for (int t = 0; t < L; t++) begin
      real d;
      d = phase_of(i, t) - phase_of(j, t);
      if (d > PI) d -= 2.0 * PI;
      if (d < -PI) d += 2.0 * PI;
      if (d > 1e-9) s++;
      else if (d < -1e-9) s--;
    end
    return ((s < 0) ? -s : s) * 128 / L;
  endfunction

  always @(posedge clk) if (!rst) begin
    if (done) ndone++;
    if (m_we) begin
      int e;
      nwr++;
      checks += 2;
      if (m_wi != NB'(ei) || m_wj != NB'(ej)) begin
        failures++; $display("FAIL pair (%0d,%0d) expected (%0d,%0d)", m_wi, m_wj, ei, ej);
      end
      e = exp_pli(ei, ej);
      if (int'(m_wdata) - e > TOL || e - int'(m_wdata) > TOL) begin
        failures++; $display("FAIL pli(%0d,%0d) %0d expected %0d", ei, ej, m_wdata, e);
      end
      if (ej == N - 1) begin ei++; ej = ei + 1; end else ej++;
    end
  end

  initial begin
    ei = 0; ej = 1;
    for (int c = 0; c < N; c++) begin
      ph1[c] = -2.5 + 0.9 * c;
      ph2[c] = 1.7 - 1.3 * c;
    end
    repeat (2) @(posedge clk);
    rst = 0;
    for (int c = 0; c < N; c++)
      for (int t = 0; t < L; t++) begin
        real ph_a, ph_b;
        ph_a = ph1[src(c)]; ph_b = ph2[src(c)];
        @(negedge clk);
        eeg_valid = 1;
        eeg_data = 16'($rtoi(9000.0 * $cos(2.0 * PI * 7 * t / L + ph_a) + 4000.0 * $cos(2.0 * PI * 13 * t / L + ph_b)));
        @(posedge clk);
        while (!eeg_ready) @(posedge clk);
      end
    @(negedge clk); eeg_valid = 0;
    repeat (N * N * L + 2000) @(posedge clk);
    checks += 2;
    if (nwr != N * (N - 1) / 2) begin failures++; $display("FAIL %0d writes", nwr); end
    if (ndone != 1) begin failures++; $display("FAIL %0d done pulses", ndone); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
