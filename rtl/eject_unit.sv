// eject_unit: picks at most one of the flits that have reached their
// destination and hands it to the local node.
//
// The node accepts one flit per cycle, so when several input flits request the
// local port a round-robin arbiter chooses one; the others lose and are
// deflected like any other flit that lost its port. The pointer marks the input
// with the highest priority; after a grant it moves to the input just after the
// winner, so every input is served within N grants. The document names the
// round-robin policy; the pointer form is this implementation's.
//
// Interface: req[i] = input i holds a flit for the local node; gnt is one-hot
// (or zero) in the same cycle. any_conflict is high when more than one input
// requested, i.e. an ejection was refused this cycle.
module eject_unit #(
  parameter int N = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt,
  output logic         any_conflict
);

  localparam int IDX_W = (N > 1) ? $clog2(N) : 1;

  logic [IDX_W-1:0] ptr;
  logic [IDX_W-1:0] win;
  logic             found;

  always_comb begin
    logic [IDX_W-1:0] idx;
    gnt   = '0;
    win   = ptr;
    found = 1'b0;
    for (int k = 0; k < N; k++) begin
      idx = IDX_W'((int'(ptr) + k) % N);
      if (!found && req[idx]) begin
        found    = 1'b1;
        win      = idx;
        gnt[idx] = 1'b1;
      end
    end
    any_conflict = found && ((req & ~gnt) != '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     ptr <= '0;
    else if (found) ptr <= (int'(win) == N-1) ? '0 : win + 1'b1;
  end

endmodule
