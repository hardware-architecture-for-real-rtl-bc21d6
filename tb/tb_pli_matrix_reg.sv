// tb_pli_matrix_reg: writes random elements (either index order), then
// checks the triangle read ports and the row port against a model matrix,
// including the symmetric copy and the zero diagonal.
module tb_pli_matrix_reg;
  localparam int N = 19, NB = 5;
  logic clk = 0, rst = 1, we = 0;
  logic [NB-1:0] wi, wj, ri, rj, rk, row_sel;
  logic [7:0] wdata, w_ij, w_ik, w_jk;
  logic [7:0] row [N];
  int model [N][N];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pli_matrix_reg #(.N(N)) dut (.*);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    for (int a = 0; a < N; a++) for (int b = 0; b < N; b++) model[a][b] = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      int a, b, v;
      a = $urandom % N; b = $urandom % N; v = $urandom % 129;
      @(negedge clk); we = 1; wi = NB'(a); wj = NB'(b); wdata = 8'(v);
      if (a != b) begin model[a][b] = v; model[b][a] = v; end
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 300; n++) begin
      int a, b, c;
      a = $urandom % N; b = $urandom % N; c = $urandom % N;
      ri = NB'(a); rj = NB'(b); rk = NB'(c); row_sel = NB'(a);
      #1;
      check("w_ij", w_ij, model[a][b]);
      check("w_ik", w_ik, model[a][c]);
      check("w_jk", w_jk, model[b][c]);
      for (int j = 0; j < N; j++) check("row", row[j], model[a][j]);
    end
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
