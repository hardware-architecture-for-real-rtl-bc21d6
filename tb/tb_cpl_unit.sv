// tb_cpl_unit: runs the Dijkstra engine on testbench-held PLI matrices and
// checks every serial distance d(s, j) against an all-pairs reference
// (Floyd-Warshall), the characteristic path length, and the cycle count
// N^2+N+1 from start to cpl_valid. Matrices: random with missing edges
// (infinite distances), a sparse one with isolated nodes, and a full one.
module tb_cpl_unit;
  import tb_ref_pkg::*;
  localparam int N  = 19;
  localparam int NB = $clog2(N);

  logic clk = 0, rst = 1, start = 0, busy;
  logic [NB-1:0] row_sel, fd_src, fd_dst;
  logic [7:0] row [N];
  logic fd_valid, fd_inf, fd_last, cpl_valid;
  logic [12:0] fd_dist;
  logic [21:0] cpl;
  int checks = 0, failures = 0, n_inf = 0, n_fd = 0;
  mat_t m, d;

  always #5 clk = ~clk;
  cpl_unit #(.N(N)) dut (.*);

  always_comb for (int j = 0; j < N; j++) row[j] = 8'(m[row_sel][j]);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) if (fd_valid) begin
    n_fd++;
    if (fd_src != fd_dst) begin
      if (d[fd_src][fd_dst] >= INF) begin
        n_inf++;
        check("inf flag", fd_inf, 1);
      end else begin
        check("inf flag", fd_inf, 0);
        check("distance", fd_dist, d[fd_src][fd_dst]);
      end
    end
  end

  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic run(input mat_t mm);
    int t0;
    m = mm;
    d = ref_distances(m, N);
    n_fd = 0;
    @(negedge clk); start = 1;
    @(posedge clk); #1 t0 = cyc;
    @(negedge clk); start = 0;
    while (!cpl_valid) begin @(posedge clk); #1; end
    check("latency", cyc - t0, N * N + N + 1);
    check("cpl", cpl, ref_cpl(m, N));
    check("stream length", n_fd, N * N);
  endtask

  initial begin
    mat_t full;
    cyc = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    run(ref_rand_matrix(N, 30));
    run(ref_rand_matrix(N, 92));
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) full[i][j] = (i == j) ? 0 : 64 + i + j;
    run(full);
    check("infinite distances seen", (n_inf > 0) ? 1 : 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
