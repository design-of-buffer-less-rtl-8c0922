// grant_cell: one crossing of the deflection matrix.
//
// A flit still looking for a port travels along its row (h_in); a port still
// free travels down its column (v_in). Where both meet the port is granted to
// the flit and neither signal continues. Otherwise a searching flit passes on
// to the next column and a free port passes on to the next row. This is the
// cell behaviour the document gives for its deflection matrix. Combinational.
module grant_cell (
  input  logic h_in,   // flit in this row still needs a port
  input  logic v_in,   // port of this column is still free
  output logic grant,
  output logic h_out,
  output logic v_out
);

  assign grant = h_in & v_in;
  assign h_out = h_in & ~v_in;
  assign v_out = ~h_in & v_in;

endmodule
