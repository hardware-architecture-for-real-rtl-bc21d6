// tb_cordic_atan2: random vectors in all four quadrants (and on the axes),
// started back to back; the phase must match atan2 (computed in real
// arithmetic, Q3.12) within 3 LSB, and `done` must come ITER clocks after
// the start.
module tb_cordic_atan2;
  localparam int ITER = 16;
  logic clk = 0, rst = 1, start = 0, ready, done;
  logic signed [23:0] x, y;
  logic signed [15:0] phase;
  int checks = 0, failures = 0, cyc = 0;
  real expq [$];
  int  t_start [$];
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  cordic_atan2 #(.XW(24), .ITER(ITER)) dut (.*);

  always @(posedge clk) if (!rst) begin
    #1;
    if (done) begin
      real e;
      int  ts;
      e = expq.pop_front();
      ts = t_start.pop_front();
      checks += 2;
      if (real'(phase) - e > 3.0 || e - real'(phase) > 3.0) begin
        failures++; $display("FAIL phase %0d expected %f", phase, e);
      end
      if (cyc - ts != ITER) begin failures++; $display("FAIL latency %0d", cyc - ts); end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      int xv, yv;
      xv = int'($urandom % 4000001) - 2000000;
      yv = int'($urandom % 4000001) - 2000000;
      if (n % 50 == 1) yv = 0;
      if (n % 50 == 2) begin xv = 0; yv = 5000; end
      if (n % 50 == 3) begin xv = -7000; yv = 0; end
      @(negedge clk);
      while (!ready) @(negedge clk);
      start = 1; x = 24'(xv); y = 24'(yv);
      expq.push_back($atan2(real'(yv), real'(xv)) * 4096.0);
      @(posedge clk); #1 t_start.push_back(cyc);
      @(negedge clk); start = 0;
      if (n % 3 == 0) repeat ($urandom % 20) @(negedge clk);
    end
    repeat (ITER + 3) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
