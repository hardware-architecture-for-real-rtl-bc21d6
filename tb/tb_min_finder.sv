// tb_min_finder: random distance vectors, infinite flags and visited masks;
// the chosen node must be the lowest-index unvisited node of smallest
// distance, finite before infinite, and `found` low when all are visited.
module tb_min_finder;
  localparam int N = 19;
  logic [12:0] dists [N];
  logic infs [N];
  logic [N-1:0] visited;
  logic found, min_inf;
  logic [4:0] idx;
  logic [12:0] min_dist;
  int checks = 0, failures = 0;
  min_finder #(.N(N)) dut (.*);

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int bi; bit bf;
      for (int j = 0; j < N; j++) begin
        dists[j] = 13'($urandom % 64);
        infs[j]  = ($urandom % 4) == 0;
      end
      visited = N'({$urandom, $urandom});
      if (n % 100 == 0) visited = '1;
      if (n % 100 == 1) visited = '0;
      bi = -1; bf = 0;
      for (int j = 0; j < N; j++)
        if (!visited[j]) begin
          if (bi < 0) bi = j;
          else if (infs[bi] && !infs[j]) bi = j;
          else if (!infs[bi] && !infs[j] && dists[j] < dists[bi]) bi = j;
        end
      #1;
      checks++;
      if (bi < 0) begin
        if (found) begin failures++; $display("FAIL found with all visited"); end
      end else if (!found || idx != 5'(bi) || min_inf != infs[bi] || min_dist != dists[bi]) begin
        failures++; $display("FAIL pick %0d expected %0d", idx, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
