// tb_ecc_rad_dia: feeds the serial distance stream of random matrices (as
// the path-length unit produces it, source by source) and checks every
// eccentricity, the radius and the diameter against the reference model.
module tb_ecc_rad_dia;
  import tb_ref_pkg::*;
  localparam int N = 19;
  logic clk = 0, rst = 1, clear = 0, fd_valid = 0, fd_inf, fd_last, valid;
  logic [4:0] fd_src, fd_dst;
  logic [12:0] fd_dist;
  logic [12:0] ecc [N];
  logic [12:0] radius, diameter;
  int checks = 0, failures = 0;
  mat_t m, d;
  always #5 clk = ~clk;
  ecc_rad_dia #(.N(N)) dut (.*);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int rep = 0; rep < 4; rep++) begin
      int rmin, rmax, e;
      m = ref_rand_matrix(N, 20 + 25 * rep);
      d = ref_distances(m, N);
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int s = 0; s < N; s++)
        for (int j = 0; j < N; j++) begin
          fd_valid = 1; fd_src = 5'(s); fd_dst = 5'(j);
          fd_inf = d[s][j] >= INF; fd_dist = fd_inf ? 13'($urandom) : 13'(d[s][j]);
          fd_last = (s == N - 1) && (j == N - 1);
          @(negedge clk);
          if ($urandom % 3 == 0) begin fd_valid = 0; @(negedge clk); end
        end
      fd_valid = 0;
      @(negedge clk);
      check("valid", valid, 1);
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
