// tb_geometric_mean: random weight triples in groups; `first` starts a new
// sum. The accumulator must equal the sum of the triple products of the
// current group (no cube root), checked after every clock.
module tb_geometric_mean;
  logic clk = 0, rst = 1, en = 0, first = 0;
  logic [7:0] w_ij, w_ik, w_jk;
  logic [32:0] t_acc;
  longint exp_sum = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  geometric_mean #(.W(8), .ACC_W(33)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      first = (n % 50) == 0;
      w_ij = 8'($urandom % 129); w_ik = 8'($urandom % 129); w_jk = 8'($urandom % 129);
      if (en) exp_sum = (first ? 0 : exp_sum) + longint'(w_ij) * w_ik * w_jk;
      @(posedge clk); #1;
      checks++;
      if (t_acc != 33'(exp_sum)) begin failures++; $display("FAIL t %0d vs %0d", t_acc, exp_sum); end
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
