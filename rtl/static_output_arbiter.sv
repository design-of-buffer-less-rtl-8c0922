// static_output_arbiter: first allocation stage for the network ports.
//
// Each network output port is given to one of the input flits whose routing
// table asked for it (its productive direction). Every output port uses the
// same fixed order of inputs, lowest input index first (WEST, SOUTH, EAST,
// NORTH, UP, DOWN); the document fixes a static order but not which one, so
// this order is an implementation choice. One multiplexer per output, one
// request per input: an input requests exactly one port, so an input is never
// granted twice. Flits that win nothing go on to the deflection unit. Purely
// combinational.
//
// Interface: req[i][o] = input i wants output o (one-hot per input);
// gnt[i][o] = input i got output o; taken[o] = output o was granted.
module static_output_arbiter #(
  parameter int N = 6
) (
  input  logic [N-1:0][N-1:0] req,
  output logic [N-1:0][N-1:0] gnt,
  output logic [N-1:0]        taken
);

  always_comb begin
    gnt   = '0;
    taken = '0;
    for (int o = 0; o < N; o++) begin
      for (int i = 0; i < N; i++) begin
        if (!taken[o] && req[i][o]) begin
          gnt[i][o] = 1'b1;
          taken[o]  = 1'b1;
        end
      end
    end
  end

endmodule
