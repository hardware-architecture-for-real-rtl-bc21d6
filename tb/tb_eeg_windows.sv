// tb_eeg_windows: a recording-like stream of windows through the whole
// design at its default size (19 channels, 128-sample windows).
//
// NW windows are sent back to back, as a recording at 256 Hz delivers them:
// the next window is offered as soon as the design accepts input again. That
// happens while the graph system is still working on the previous matrix, so
// input and graph computation overlap. Every window has its own random tone
// frequencies, amplitudes and channel phases (the main tone's phases are a
// shuffled grid, the weaker tone's are free); channel 18 repeats a different
// channel in each window, so each window has an exact zero-weight edge.
// A checker process waits for each `done` and checks:
//   * every PLI value against the value computed from the closed-form phases,
//     within PLI_TOL/128, widened by 2/128 for each sample whose exact phase
//     difference lies within 0.01 rad of 0 or +-pi (there the sign is set by
//     rounding);
//   * every graph result bit-exactly against the reference model applied to
//     the matrix the hardware produced;
//   * the clocks from the window's last sample to `done` against the 0.5 ms
//     real-time budget at 22.16 MHz (11,080 clocks).
// It also counts the clocks in which a new sample was accepted while the
// graph system was busy; that overlap must occur.
module tb_eeg_windows;
  import tb_ref_pkg::*;
  localparam int  N = 19, L = 128, NB = 5, NW = 8;
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

  int checks = 0, failures = 0, n_overlap = 0, n_zero = 0;
  int cyc = 0;
  int t_last [NW];
  int perm [N];
  mat_t hw;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  eeg_connectivity_top dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // per-window stimulus parameters
  real amp1 [NW], amp2 [NW];
  int  f1 [NW], f2 [NW], dup [NW];
  real ph1 [NW][N], ph2 [NW][N];

  function automatic int src(input int w, input int c);
    return (c == N - 1) ? dup[w] : c;
  endfunction

  function automatic real sample(input int w, input int c, input int t);
    int s;
    s = src(w, c);
    return amp1[w] * $cos(2.0 * PI * f1[w] * t / L + ph1[w][s]) +
           amp2[w] * $cos(2.0 * PI * f2[w] * t / L + ph2[w][s]);
  endfunction

  function automatic real phase_of(input int w, input int c, input int t);
    int s;
    real re, im;
    s = src(w, c);
    re = amp1[w] * $cos(2.0 * PI * f1[w] * t / L + ph1[w][s]) + amp2[w] * $cos(2.0 * PI * f2[w] * t / L + ph2[w][s]);
    im = amp1[w] * $sin(2.0 * PI * f1[w] * t / L + ph1[w][s]) + amp2[w] * $sin(2.0 * PI * f2[w] * t / L + ph2[w][s]);
    return $atan2(im, re);
  endfunction

  // expected PLI (Q1.7) and the number of ambiguous samples: those whose
  // wrapped difference lies within AMB rad of 0 or of +-pi, where the sign
  // legitimately depends on rounding. Each one may move the result by 2/128.
  localparam real AMB = 0.01;
  function automatic int exp_pli(input int w, input int i, input int j, output int amb);
    int s;
    real d;
    s = 0; amb = 0;
    for (int t = 0; t < L; t++) begin
      d = phase_of(w, i, t) - phase_of(w, j, t);
      if (d > PI) d -= 2.0 * PI;
      if (d < -PI) d += 2.0 * PI;
      if (d > 1e-9) s++;
      else if (d < -1e-9) s--;
      if ((d < AMB && d > -AMB) || d > PI - AMB || d < -PI + AMB) amb++;
    end
    return ((s < 0) ? -s : s) * 128 / L;
  endfunction

  // matrix capture, overlap counter, per-node result checks
  always @(posedge clk) if (!rst) begin
    if (eeg_valid && eeg_ready && dut.g_busy) n_overlap++;
    if (m_we) begin
      hw[m_wi][m_wj] = m_wdata;
      hw[m_wj][m_wi] = m_wdata;
      if (m_wdata == 0) n_zero++;
    end
    if (deg_valid) begin
      check("degree", deg_k, ref_degree(hw, N, deg_node));
      check("wdegree", deg_kw, ref_wdegree(hw, N, deg_node));
      check("triangle sum", tri_sum, ref_tri(hw, N, deg_node));
    end
    if (cc_valid) check("cc", cc, ref_cc_node(hw, N, cc_node));
  end

  initial begin
    for (int w = 0; w < NW; w++) begin
      amp1[w] = 6000.0 + real'($urandom % 6000);
      amp2[w] = amp1[w] * (0.2 + 0.2 * real'($urandom % 100) / 100.0);
      f1[w]   = 2 + int'($urandom % 30);
      f2[w]   = f1[w] + 3 + int'($urandom % 25);
      dup[w]  = w % (N - 1);
      // channel phases: a random permutation of N points 2*pi/N apart, so
      // no two channels sit so close that the sign of their difference is
      // decided by rounding
      for (int c = 0; c < N; c++) perm[c] = c;
      for (int c = N - 1; c > 0; c--) begin
        int r, tmp;
        r = int'($urandom % (c + 1));
        tmp = perm[c]; perm[c] = perm[r]; perm[r] = tmp;
      end
      for (int c = 0; c < N; c++) begin
        ph1[w][c] = 2.0 * PI * perm[c] / N - PI;
        ph2[w][c] = 2.0 * PI * real'($urandom % 1000) / 1000.0 - PI;
      end
      t_last[w] = 0;
    end
    for (int i = 0; i < MAXN; i++) for (int j = 0; j < MAXN; j++) hw[i][j] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    fork
      // sender: windows back to back
      for (int w = 0; w < NW; w++)
        for (int c = 0; c < N; c++)
          for (int t = 0; t < L; t++) begin
            @(negedge clk);
            eeg_valid = 1; eeg_data = 16'($rtoi(sample(w, c, t)));
            @(posedge clk);
            while (!eeg_ready) @(posedge clk);
            if (c == N - 1 && t == L - 1) t_last[w] = cyc;
            #1;
            if (c == N - 1 && t == L - 1) eeg_valid = 0;
          end
      // checker: one `done` per window
      for (int w = 0; w < NW; w++) begin
        do begin @(posedge clk); #1; end while (!done);
        $display("window %0d: tones %0d/%0d, %0d clocks from the last sample to done",
                 w, f1[w], f2[w], cyc - t_last[w]);
        check("window latency bound", (cyc - t_last[w]) < LAT_MAX, 1);
        for (int i = 0; i < N; i++)
          for (int j = i + 1; j < N; j++) begin
            int e, g, amb, tol;
            e = exp_pli(w, i, j, amb);
            g = hw[i][j];
            tol = PLI_TOL + (i == dup[w] && j == N - 1 ? 0 : 2 * amb * 128 / L);
            checks++;
            if (g - e > tol || e - g > tol) begin
              failures++;
              $display("FAIL window %0d pli(%0d,%0d): got %0d expected %0d", w, i, j, g, e);
            end
          end
        check("pli of the repeated channel", hw[dup[w]][N - 1], 0);
        check("density", dens, ref_density(hw, N));
        check("transitivity", trans, ref_transitivity(hw, N));
        check("cc mean", cc_mean, ref_cc_mean(hw, N));
        check("cpl", cpl, ref_cpl(hw, N));
        for (int i = 0; i < N; i++) check("ecc", ecc[i], ref_ecc(hw, N, i));
      end
    join
    check("input accepted while the graph system was busy", n_overlap > 0, 1);
    check("zero-weight edges seen", n_zero >= NW, 1);
    $display("overlap clocks=%0d zero edges=%0d", n_overlap, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
