// switch_encoder: the router's switch, built from per-input encoders and
// per-output multiplexers instead of a full crossbar.
//
// Each input's one-hot grant vector is encoded into a {dequeue, port} word:
// the top bit says the input's flit leaves this cycle (it releases the input
// register or pops the injection queue), the three bits below give the output
// port. Each output then has a multiplexer that selects the flit of the input
// whose encoded port names it. An output that no input selected carries an
// all-zero (invalid) flit. Only the header took part in allocation; the payload
// moves only here. The {dequeue, port} encoding follows the document's
// description of the switch; the all-zero idle output is this design's choice.
// Combinational.
module switch_encoder
  import noc_pkg::*;
#(
  parameter int FLIT_W = 73
) (
  input  logic [NPORTS-1:0][NPORTS-1:0] gnt,       // gnt[i][o]
  input  logic [FLIT_W-1:0]             flit_in  [NPORTS],
  output logic [NPORTS-1:0]             deq,
  output logic [FLIT_W-1:0]             flit_out [NPORTS]
);

  logic [PORT_W:0] enc [NPORTS];   // {dequeue, port}

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      enc[i] = '0;
      for (int o = 0; o < NPORTS; o++)
        if (gnt[i][o]) enc[i] = {1'b1, PORT_W'(o)};
      deq[i] = enc[i][PORT_W];
    end
    for (int o = 0; o < NPORTS; o++) begin
      flit_out[o] = '0;
      for (int i = 0; i < NPORTS; i++)
        if (enc[i][PORT_W] && int'(enc[i][PORT_W-1:0]) == o) flit_out[o] = flit_in[i];
    end
  end

endmodule
