// deflection_unit: second allocation stage; gives every flit that lost
// arbitration some free network port.
//
// An N x N matrix of grant_cells (6 x 6 in the 3D router, 4 x 4 in a 2D one).
// Row i carries "flit on input i still needs a port" from left to right;
// column j carries "output j is still free" from top to bottom. Each free port
// is taken by the first searching flit it meets and each searching flit by the
// first free port it meets, so all matches are made in parallel in one
// combinational pass. Because the row signal is cleared at its first grant and
// the column signal likewise, the result is a matching: as long as there are
// at least as many free ports as searching flits, every flit gets a port (the
// matrix behaves as a greedy assignment: input 0 gets the lowest free port,
// input 1 the next, ...). The free ports that remain are reported for the
// injection stage.
//
// The document places the requests on the diagonal of the matrix to balance
// the delay; here the requests enter at the left edge and the free ports at the
// top edge, which gives the same matching without a wrap-around path.
module deflection_unit #(
  parameter int N = 6
) (
  input  logic [N-1:0]        need,       // input i lost and needs a port
  input  logic [N-1:0]        free,       // output j exists and is not taken
  output logic [N-1:0][N-1:0] gnt,        // gnt[i][j]: input i deflected to j
  output logic [N-1:0]        free_out,   // outputs still free afterwards
  output logic [N-1:0]        unserved    // inputs left without a port
);

  logic [N-1:0][N:0] h;   // h[i][j]: row i entering column j
  logic [N:0][N-1:0] v;   // v[i][j]: column j entering row i

  for (genvar i = 0; i < N; i++) begin : g_row
    assign h[i][0] = need[i];
    assign unserved[i] = h[i][N];
  end
  for (genvar j = 0; j < N; j++) begin : g_col
    assign v[0][j] = free[j];
    assign free_out[j] = v[N][j];
  end

  for (genvar i = 0; i < N; i++) begin : g_i
    for (genvar j = 0; j < N; j++) begin : g_j
      grant_cell u_cell (
        .h_in  (h[i][j]),
        .v_in  (v[i][j]),
        .grant (gnt[i][j]),
        .h_out (h[i][j+1]),
        .v_out (v[i+1][j])
      );
    end
  end

endmodule
