// pli_matrix_reg: the PLI matrix register of the graph-connectivity system.
//
// Holds the N x N PLI matrix as registers. A write of element (i, j) stores it
// in both (i, j) and (j, i), so the matrix is always symmetric; the diagonal is
// never written and reads as zero. Three combinational triangle read ports
// give w(i,j), w(i,k) and w(j,k) for the clustering-coefficient sweep, and a
// combinational row port gives the whole row w(r, 0..N-1) to the N shortest
// path finding units of the characteristic-path-length unit.
// Timing: a write takes effect at the clock edge; reads are combinational.
// The register file and its three triangle outputs follow the document's
// figure of the clustering-coefficient module; the symmetric storage, the
// row port and the synchronous clear are this design's choices.
module pli_matrix_reg #(
  parameter int N = fc_pkg::N_CH,
  parameter int W = fc_pkg::W_W
) (
  input  logic                 clk,
  input  logic                 rst,      // synchronous, clears the matrix
  input  logic                 we,
  input  logic [$clog2(N)-1:0] wi,
  input  logic [$clog2(N)-1:0] wj,
  input  logic [W-1:0]         wdata,
  input  logic [$clog2(N)-1:0] ri,
  input  logic [$clog2(N)-1:0] rj,
  input  logic [$clog2(N)-1:0] rk,
  output logic [W-1:0]         w_ij,
  output logic [W-1:0]         w_ik,
  output logic [W-1:0]         w_jk,
  input  logic [$clog2(N)-1:0] row_sel,
  output logic [W-1:0]         row [N]
);
  logic [W-1:0] m [N][N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) m[a][b] <= '0;
    end else if (we && (wi != wj)) begin
      m[wi][wj] <= wdata;
      m[wj][wi] <= wdata;
    end
  end

  assign w_ij = m[ri][rj];
  assign w_ik = m[ri][rk];
  assign w_jk = m[rj][rk];

  always_comb begin
    for (int b = 0; b < N; b++) row[b] = m[row_sel][b];
  end
endmodule
