// tb_spfu: random relaxation sequences against a model of one SPFU: init
// loads the candidate, otherwise the tentative distance only drops to a
// smaller finite candidate d(s,k) + 128 - w; a zero weight or an infinite
// current node gives no candidate; en low freezes the unit.
module tb_spfu;
  logic clk = 0, rst = 1, en = 0, init = 0, cur_inf = 0, min_inf;
  logic [7:0] pli;
  logic [12:0] cur_dist, min_dist;
  int checks = 0, failures = 0, n_take = 0, n_keep = 0;
  int md; bit mi;
  always #5 clk = ~clk;
  spfu dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    md = 0; mi = 1;
    for (int n = 0; n < 2000; n++) begin
      int cand; bit cinf;
      @(negedge clk);
      en = ($urandom % 8) != 0; init = ($urandom % 10) == 0;
      pli = 8'(($urandom % 5 == 0) ? 0 : $urandom % 129);
      cur_dist = 13'($urandom % 1500); cur_inf = ($urandom % 8) == 0;
      cand = cur_dist + 128 - pli; cinf = cur_inf || (pli == 0);
      if (en && (init || (!cinf && (mi || cand < md)))) begin md = cand; mi = cinf; n_take++; end
      else n_keep++;
      @(posedge clk); #1;
      checks++;
      if (min_inf != mi || (!mi && min_dist != 13'(md))) begin
        failures++; $display("FAIL step %0d: %0d/%0d expected %0d/%0d", n, min_dist, min_inf, md, mi);
      end
    end
    checks++;
    if (n_take == 0 || n_keep == 0) failures++;
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
