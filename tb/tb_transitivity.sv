// tb_transitivity: streams per-node degrees and triangle sums, back to back
// in some runs and with random gaps in others (the clustering unit delivers
// one node every C(N-1,2) clocks), and checks
// T = (sum 2t / sum k(k-1)) >> 5, that `valid` comes 5 clocks after the
// last node's deg_valid (N*C(N-1,2)+6 from the sweep start) and that it is a
// one-clock pulse. Runs include an all-sparse graph (no triangles possible).
module tb_transitivity;
  localparam int N = 19;
  logic clk = 0, rst = 1, deg_valid = 0, deg_last = 0, valid;
  logic [4:0] deg_node, deg_k;
  logic [32:0] t_in;
  logic [16:0] trans;
  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  transitivity #(.N(N)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int rep = 0; rep < 40; rep++) begin
      longint num, den;
      int t_last;
      num = 0; den = 0;
      for (int i = 0; i < N; i++) begin
        int k;
        longint t;
        @(negedge clk);
        if (rep % 2 == 1) begin
          deg_valid = 0; deg_last = 0;
          repeat ($urandom % 4) @(negedge clk);
        end
        k = (rep % 10 == 3) ? (i % 2) : ($urandom % N);
        t = (k < 2) ? 0 : ($urandom % (k * (k - 1) / 2 * 2097152 + 1));
        deg_valid = 1; deg_node = 5'(i); deg_last = (i == N - 1);
        deg_k = 5'(k); t_in = 33'(t);
        num += 2 * t; den += k * ((k > 0) ? k - 1 : 0);
      end
      t_last = cyc;
      @(negedge clk); deg_valid = 0; deg_last = 0;
      while (!valid) begin @(posedge clk); #1; end
      checks += 2;
      if (cyc - t_last != 5) begin failures++; $display("FAIL latency %0d", cyc - t_last); end
      @(posedge clk); #1;
      checks++;
      if (valid) begin failures++; $display("FAIL valid longer than one clock"); end
      if (trans != 17'((den == 0) ? 0 : (num / den) >> 5)) begin
        failures++; $display("FAIL trans %0d", trans);
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
