// tb_graph_connectivity: loads random PLI matrices through the write port,
// starts the graph system and checks every result against the reference
// model: per-node degree, weighted degree, triangle sum and clustering
// coefficient; mean clustering coefficient, density, transitivity,
// characteristic path length, eccentricities, radius and diameter; and the
// cycle counts of the document's table (degree M+1, density M+2,
// transitivity M+6, clustering M+7, path length N^2+N+1, M = N*C(N-1,2)).
module tb_graph_connectivity;
  import tb_ref_pkg::*;
  localparam int N  = 19;
  localparam int NB = $clog2(N);
  localparam int M  = N * (N - 1) * (N - 2) / 2;

  logic clk = 0, rst = 1, start = 0, busy, done;
  logic m_we = 0;
  logic [NB-1:0] m_wi, m_wj;
  logic [7:0] m_wdata;
  logic deg_valid, cc_valid;
  logic [NB-1:0] deg_node, deg_k, cc_node;
  logic [12:0] deg_kw;
  logic [32:0] tri_sum;
  logic [16:0] cc, cc_mean, dens, trans;
  logic [21:0] cpl;
  logic [12:0] ecc [N];
  logic [12:0] radius, diameter;
  int checks = 0, failures = 0;
  mat_t m;

  always #5 clk = ~clk;
  graph_connectivity #(.N(N)) dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) if (!rst) begin
    if (deg_valid) begin
      check("degree", deg_k, ref_degree(m, N, deg_node));
      check("wdegree", deg_kw, ref_wdegree(m, N, deg_node));
      check("tri", tri_sum, ref_tri(m, N, deg_node));
    end
    if (cc_valid) check("cc", cc, ref_cc_node(m, N, cc_node));
  end

  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic run(input mat_t mm);
    int t0, t_dens, t_trans, t_mean, t_cpl;
    logic [16:0] dprev;
    m = mm;
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++) begin
        @(negedge clk); m_we = 1; m_wi = NB'(j); m_wj = NB'(i); m_wdata = 8'(m[i][j]);
      end
    @(negedge clk); m_we = 0; start = 1;
    @(posedge clk); #1 t0 = cyc;
    @(negedge clk); start = 0;
    t_dens = -1; t_trans = -1; t_mean = -1; t_cpl = -1;
    while (!done) begin
      @(posedge clk); #1;
      if (dut.dens_valid && t_dens < 0)   t_dens  = cyc - t0;
      if (dut.trans_valid)                t_trans = cyc - t0;
      if (dut.mean_valid)                 t_mean  = cyc - t0;
      if (dut.cpl_valid && t_cpl < 0)     t_cpl   = cyc - t0;
    end
    check("density", dens, ref_density(m, N));
    check("transitivity", trans, ref_transitivity(m, N));
    check("cc mean", cc_mean, ref_cc_mean(m, N));
    check("cpl", cpl, ref_cpl(m, N));
    begin
      int rmin, rmax, e;
      rmin = INF; rmax = 0;
      for (int i = 0; i < N; i++) begin
        e = ref_ecc(m, N, i);
        check("ecc", ecc[i], e);
        if (e < rmin) rmin = e;
        if (e > rmax) rmax = e;
      end
      check("radius", radius, rmin);
      check("diameter", diameter, rmax);
    end
    check("density latency", t_dens, M + 2);
    check("transitivity latency", t_trans, M + 6);
    check("cc latency", t_mean, M + 7);
    check("cpl latency", t_cpl, N * N + N + 1);
  endtask

  initial begin
    cyc = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(ref_rand_matrix(N, 25));
    run(ref_rand_matrix(N, 70));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
