// tb_degree_unit: replays the triangle sweep order for every node of random
// matrices (with zero edges) and checks that the binary and weighted degree
// of each node come out as the plain row count and row sum.
module tb_degree_unit;
  import tb_ref_pkg::*;
  localparam int N = 19;
  logic clk = 0, rst = 1, en = 0, first = 0, new_row = 0, last_row = 0;
  logic [7:0] w_ij, w_ik;
  logic [4:0] k_acc;
  logic [12:0] kw_acc;
  int checks = 0, failures = 0;
  mat_t m;
  always #5 clk = ~clk;
  degree_unit #(.N(N)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int rep = 0; rep < 3; rep++) begin
      m = ref_rand_matrix(N, 30 * rep);
      for (int i = 0; i < N; i++) begin
        for (int a = 0; a < N - 1; a++)
          for (int b = a + 1; b < N - 1; b++) begin
            int j, k;
            j = (a < i) ? a : a + 1;
            k = (b < i) ? b : b + 1;
            @(negedge clk);
            en = 1; first = (a == 0 && b == 1); new_row = (b == a + 1);
            last_row = (a == N - 3);
            w_ij = 8'(m[i][j]); w_ik = 8'(m[i][k]);
          end
        @(negedge clk); en = 0;
        checks += 2;
        if (k_acc != 5'(ref_degree(m, N, i))) begin failures++; $display("FAIL k node %0d: %0d", i, k_acc); end
        if (kw_acc != 13'(ref_wdegree(m, N, i))) begin failures++; $display("FAIL kw node %0d: %0d", i, kw_acc); end
      end
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
