// tb_analytic_signal: feeds windows of cosines (and a two-tone mix) and
// checks that the real output returns the input and the imaginary output is
// its Hilbert transform (the matching sine), computed here with real
// arithmetic, within a fixed-point tolerance; also checks the window time
// L + L*log2(L) clocks from the first input sample to the first output.
module tb_analytic_signal;
  localparam int L = 128, SHIFT = 4;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic signed [15:0] in_data;
  logic signed [23:0] out_re, out_im;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  analytic_signal #(.L(L)) dut (.*);

  real ex_re [L], ex_im [L];
  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic window(input int f1, input real a1, input int f2, input real a2, input real ph);
    int t0, t1, n;
    real err_re, err_im, tol;
    for (int t = 0; t < L; t++) begin
      real th1, th2;
      th1 = 2.0 * PI * f1 * t / L + ph;
      th2 = 2.0 * PI * f2 * t / L;
      ex_re[t] = a1 * $cos(th1) + a2 * $cos(th2);
      ex_im[t] = a1 * $sin(th1) + a2 * $sin(th2);
    end
    for (int t = 0; t < L; t++) begin
      @(negedge clk);
      in_valid = 1; in_data = 16'($rtoi(ex_re[t]));
      while (!in_ready) @(negedge clk);
      if (t == 0) t0 = cyc;
    end
    @(negedge clk); in_valid = 0;
    n = 0; err_re = 0; err_im = 0; tol = 40.0;
    while (n < L) begin
      @(posedge clk); #1;
      if (n == 0 && out_valid) begin
        t1 = cyc;
        checks++;
        if (t1 - t0 != L + L * 7) begin
          failures++;
          $display("FAIL window time %0d", t1 - t0);
        end
      end
      if (out_valid) begin
        real gr, gi;
        gr = real'(out_re) / (2.0 ** SHIFT);
        gi = real'(out_im) / (2.0 ** SHIFT);
        checks += 2;
        if ((gr - ex_re[n]) > tol || (ex_re[n] - gr) > tol) begin failures++; $display("FAIL re[%0d] %f vs %f", n, gr, ex_re[n]); end
        if ((gi - ex_im[n]) > tol || (ex_im[n] - gi) > tol) begin failures++; $display("FAIL im[%0d] %f vs %f", n, gi, ex_im[n]); end
        n++;
      end
    end
  endtask

  initial begin
    cyc = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    window(5, 20000.0, 0, 0.0, 0.3);
    window(9, 12000.0, 23, 9000.0, 1.1);
    window(1, 30000.0, 0, 0.0, -2.0);
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
