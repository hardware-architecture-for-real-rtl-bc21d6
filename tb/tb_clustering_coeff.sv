// tb_clustering_coeff: drives the clustering-coefficient unit from a
// testbench-held PLI matrix and checks every node's degree, weighted degree,
// triangle sum and clustering coefficient, the mean, and the cycle counts
// N*C(N-1,2)+1 (last degree) and N*C(N-1,2)+7 (mean) against the reference
// model. Three matrices: random, sparse (nodes with fewer than two edges) and
// full.
module tb_clustering_coeff;
  import tb_ref_pkg::*;
  localparam int N  = 19;
  localparam int NB = $clog2(N);
  localparam int M  = N * (N - 1) * (N - 2) / 2;

  logic clk = 0, rst = 1, start = 0, busy;
  logic [NB-1:0] ri, rj, rk;
  logic [7:0] w_ij, w_ik, w_jk;
  logic deg_valid, deg_last, cc_valid, cc_last, mean_valid;
  logic [NB-1:0] deg_node, deg_k, cc_node;
  logic [12:0] deg_kw;
  logic [32:0] t_out;
  logic [16:0] cc, cc_mean;
  int checks = 0, failures = 0;
  mat_t m;

  always #5 clk = ~clk;

  clustering_coeff #(.N(N)) dut (.*);

  assign w_ij = 8'(m[ri][rj]);
  assign w_ik = 8'(m[ri][rk]);
  assign w_jk = 8'(m[rj][rk]);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) if (!rst) begin
    if (deg_valid) begin
      check("degree", deg_k, ref_degree(m, N, deg_node));
      check("wdegree", deg_kw, ref_wdegree(m, N, deg_node));
      check("tri", t_out, ref_tri(m, N, deg_node));
    end
    if (cc_valid) check("cc", cc, ref_cc_node(m, N, cc_node));
  end

  task automatic run(input mat_t mm);
    int t0, t_deg, t_mean;
    m = mm;
    @(negedge clk); start = 1;
    @(posedge clk); #1 t0 = cyc;
    @(negedge clk); start = 0;
    t_deg = -1;
    while (!mean_valid) begin
      @(posedge clk);
      #1 if (deg_valid && deg_last) t_deg = cyc - t0;
    end
    t_mean = cyc - t0;
    check("mean", cc_mean, ref_cc_mean(m, N));
    check("deg latency", t_deg, M + 1);
    check("mean latency", t_mean, M + 7);
  endtask

  initial begin
    mat_t full;
    cyc = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(ref_rand_matrix(N, 20));
    run(ref_rand_matrix(N, 85));
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) full[i][j] = (i == j) ? 0 : 128;
    run(full);
    check("full cc mean", cc_mean, 65536 * N * ref_recip(N) >> 16);
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
