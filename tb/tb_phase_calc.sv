// tb_phase_calc: streams random vectors through the CORDIC bank at one per
// clock (with occasional gaps). Checks that the input is never stalled, that
// phases come out in input order and match atan2 within 3 LSB (Q3.12), and
// that each phase is sampled ITER+1 rising edges after its input was
// presented (the accepting edge, ITER CORDIC steps).
module tb_phase_calc;
  localparam int ITER = 16;
  logic clk = 0, rst = 1, in_valid = 0, in_ready, out_valid;
  logic signed [23:0] in_x, in_y;
  logic signed [15:0] out_phase;
  int checks = 0, failures = 0, cyc = 0, stalls = 0, nout = 0;
  real expq [$];
  int  tq [$];
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  phase_calc #(.XW(24), .ITER(ITER), .NUM(ITER)) dut (.*);

  always @(posedge clk) if (!rst) begin
    if (in_valid && !in_ready) stalls++;
    if (out_valid) begin
      real e;
      int  ts;
      e = expq.pop_front(); ts = tq.pop_front();
      nout++;
      checks += 2;
      if (real'(out_phase) - e > 3.0 || e - real'(out_phase) > 3.0) begin
        failures++; $display("FAIL phase %0d expected %f", out_phase, e);
      end
      if (cyc - ts != ITER + 1) begin failures++; $display("FAIL latency %0d", cyc - ts); end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      int xv, yv;
      @(negedge clk);
      if (n % 7 == 0) begin in_valid = 0; @(negedge clk); end
      xv = int'($urandom % 4000001) - 2000000;
      yv = int'($urandom % 4000001) - 2000000;
      in_valid = 1; in_x = 24'(xv); in_y = 24'(yv);
      expq.push_back($atan2(real'(yv), real'(xv)) * 4096.0);
      tq.push_back(cyc);
    end
    @(negedge clk); in_valid = 0;
    repeat (ITER + 4) @(posedge clk);
    check_end();
  end

  task automatic check_end();
    checks += 2;
    if (stalls != 0) begin failures++; $display("FAIL %0d stalls", stalls); end
    if (nout != 1000) begin failures++; $display("FAIL %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
