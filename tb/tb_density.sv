// tb_density: streams random per-node degrees as the clustering unit would
// and checks D = sum(k) * round(2^16/(N^2-N)) and the one-clock valid pulse
// after the last node; two runs check the restart at node 0.
module tb_density;
  localparam int N = 19;
  logic clk = 0, rst = 1, deg_valid = 0, deg_last = 0, valid;
  logic [4:0] deg_node, deg_k;
  logic [16:0] dens;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  density #(.N(N)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int rep = 0; rep < 3; rep++) begin
      int s;
      s = 0;
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        deg_valid = 1; deg_node = 5'(i); deg_last = (i == N - 1);
        deg_k = 5'((rep == 2) ? N - 1 : $urandom % N);
        s += deg_k;
        @(negedge clk); deg_valid = 0; deg_last = 0;
        checks++;
        if (valid != (i == N - 1)) begin failures++; $display("FAIL valid at node %0d", i); end
        repeat ($urandom % 3) @(negedge clk);
      end
      checks++;
      if (dens != 17'(s * (((1 << 16) + (N * N - N) / 2) / (N * N - N)))) begin
        failures++; $display("FAIL density %0d (sum %0d)", dens, s);
      end
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
