// tb_eeg_connectivity_top: end-to-end test of the whole design at its default
// size (19 channels, 128-sample windows).
//
// Each channel is a sum of two tones with a channel-specific phase, so the
// analytic signal and the instantaneous phases are known in closed form; the
// expected PLI of every pair is computed here with real arithmetic and the
// hardware value must lie within PLI_TOL/128 of it. Channels 17 and 18
// repeat channels 0 and 1, which gives exact zero-PLI (missing) edges. The
// graph results are then checked exactly against the reference model run on
// the PLI matrix the hardware produced. Two windows are sent back to back.
// Mechanisms counted (each must occur): input stalls while a channel is
// transformed, CORDIC inputs in the left half plane, phase differences that
// wrap past pi, zero-weight edges and FIFO loads of a reference channel.
// Nodes with an infinite distance are counted for information only; the
// path-search testbenches cover them. The clocks from the last sample of a
// window to `done` are printed and must stay below LAT_MAX, the 0.5 ms
// real-time budget at a 22.16 MHz clock.
module tb_eeg_connectivity_top;
  import tb_ref_pkg::*;
  localparam int  N = 19, L = 128, NB = 5;
  localparam int  PLI_TOL = 4;
  localparam int  LAT_MAX = 11080;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst = 1;
  logic eeg_valid = 0, eeg_ready;
  logic signed [15:0] eeg_data;
  logic m_we;
  logic [NB-1:0] m_wi, m_wj;
  logic [7:0] m_wdata;
  logic deg_valid, cc_valid, done, busy;
  logic [32:0] tri_sum;
  logic [NB-1:0] deg_node, deg_k, cc_node;
  logic [12:0] deg_kw;
  logic [16:0] cc, cc_mean, dens, trans;
  logic [21:0] cpl;
  logic [12:0] ecc [N];
  logic [12:0] radius, diameter;

  int checks = 0, failures = 0;
  int n_stall = 0, n_left = 0, n_wrap = 0, n_zero = 0, n_load = 0, n_inf = 0;
  mat_t hw, expw;

  always #5 clk = ~clk;
  int cyc = 0, t_last = 0, t_pli = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (dut.pli_done) t_pli = cyc;

  eeg_connectivity_top dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // window stimulus
  real amp1, amp2;
  int  f1, f2;
  real ph1 [N], ph2 [N];

  function automatic real sample(input int c, input int t);
    int cc_;
    cc_ = (c == 17) ? 0 : ((c == 18) ? 1 : c);
    return amp1 * $cos(2.0 * PI * f1 * t / L + ph1[cc_]) +
           amp2 * $cos(2.0 * PI * f2 * t / L + ph2[cc_]);
  endfunction

  function automatic real phase_of(input int c, input int t);
    int cc_;
    real re, im;
    cc_ = (c == 17) ? 0 : ((c == 18) ? 1 : c);
    re = amp1 * $cos(2.0 * PI * f1 * t / L + ph1[cc_]) + amp2 * $cos(2.0 * PI * f2 * t / L + ph2[cc_]);
    im = amp1 * $sin(2.0 * PI * f1 * t / L + ph1[cc_]) + amp2 * $sin(2.0 * PI * f2 * t / L + ph2[cc_]);
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
    return (s < 0) ? -s : s;
  endfunction

  // mechanism counters and matrix capture
  always @(posedge clk) if (!rst) begin
    if (eeg_valid && !eeg_ready) n_stall++;
    if (dut.u_pli.u_pc.in_x < 0 && dut.u_pli.u_pc.in_ready && dut.u_pli.as_out_valid) n_left++;
    if (dut.u_pli.u_pli.wrap) n_wrap++;
    if (dut.u_pli.u_pli.load && dut.u_pli.u_pli.ptr == 0) n_load++;
    if (m_we) begin
      hw[m_wi][m_wj] = m_wdata;
      hw[m_wj][m_wi] = m_wdata;
      if (m_wdata == 0) n_zero++;
    end
  end

  task automatic run_window(input int seed);
    mat_t d;
    for (int c = 0; c < N; c++) begin
      ph1[c] = 2.0 * PI * ((c * 37 + seed * 11) % 100) / 100.0 - PI;
      ph2[c] = 2.0 * PI * ((c * 53 + seed * 29) % 100) / 100.0 - PI;
    end
    for (int i = 0; i < MAXN; i++) for (int j = 0; j < MAXN; j++) hw[i][j] = 0;
    for (int c = 0; c < N; c++)
      for (int t = 0; t < L; t++) begin
        @(negedge clk);
        eeg_valid = 1; eeg_data = 16'($rtoi(sample(c, t)));
        @(posedge clk);
        while (!eeg_ready) @(posedge clk);
      end
    t_last = cyc;
    @(negedge clk); eeg_valid = 0;
    do begin @(posedge clk); #1; end while (!done);
    $display("window %0d: %0d clocks from the last sample to done (PLI matrix after %0d)",
             seed, cyc - t_last, t_pli - t_last);
    check("window latency bound", (cyc - t_last) < LAT_MAX, 1);
    @(posedge clk); #1 check("idle after done", busy, 0);
    // PLI matrix against the closed-form phases
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++) begin
        int e, g;
        e = exp_pli(i, j) * 128 / L;
        g = hw[i][j];
        checks++;
        if (g - e > PLI_TOL || e - g > PLI_TOL) begin
          failures++;
          $display("FAIL pli(%0d,%0d): got %0d expected %0d", i, j, g, e);
        end
      end
    check("pli of a repeated channel", hw[0][17], 0);
    // graph results against the reference model on the hardware matrix
    check("density", dens, ref_density(hw, N));
    check("transitivity", trans, ref_transitivity(hw, N));
    check("cc mean", cc_mean, ref_cc_mean(hw, N));
    check("cpl", cpl, ref_cpl(hw, N));
    d = ref_distances(hw, N);
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) if (d[i][j] >= INF) n_inf++;
      check("ecc", ecc[i], ref_ecc(hw, N, i));
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (deg_valid) begin
      check("degree", deg_k, ref_degree(hw, N, deg_node));
      check("wdegree", deg_kw, ref_wdegree(hw, N, deg_node));
      check("triangle sum", tri_sum, ref_tri(hw, N, deg_node));
    end
    if (cc_valid) check("cc", cc, ref_cc_node(hw, N, cc_node));
  end

  initial begin
    amp1 = 9000.0; amp2 = 5000.0; f1 = 6; f2 = 11;
    repeat (3) @(posedge clk);
    rst = 0;
    run_window(1);
    amp1 = 12000.0; amp2 = 7000.0; f1 = 3; f2 = 20;
    run_window(2);
    check("stalls seen", n_stall > 0, 1);
    check("left-half-plane CORDIC inputs seen", n_left > 0, 1);
    check("phase wraps seen", n_wrap > 0, 1);
    check("zero-weight edges seen", n_zero > 0, 1);
    check("reference FIFO loads", n_load, 2 * (N - 1));
    $display("mechanisms: stalls=%0d left=%0d wraps=%0d zero_edges=%0d fifo_loads=%0d inf_dist=%0d",
             n_stall, n_left, n_wrap, n_zero, n_load, n_inf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
