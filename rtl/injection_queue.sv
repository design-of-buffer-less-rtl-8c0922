// injection_queue: the only buffer of the buffer-less router, between the
// local node and the router's local input.
//
// A circular FIFO of DEPTH flits held in a small memory array (a distributed
// RAM on an FPGA) with separate read and write pointers. The node writes with
// push; the router reads the head combinationally and pops it when the flit is
// injected. Every pop returns one credit to the node (credit-based flow
// control, the only back-pressure in the network). The default depth of eight
// slots is the buffer depth of the generator configuration the design starts
// from; the document does not give a separate depth for this queue.
//
// Timing: a flit pushed at edge t is at the head from cycle t+1 on. A push
// into a full queue is refused (and flagged by an assertion).
module injection_queue #(
  parameter int FLIT_W = 73,
  parameter int DEPTH  = 8,
  localparam int PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic [FLIT_W-1:0] push_flit,
  input  logic              pop,
  output logic [FLIT_W-1:0] head,
  output logic              head_valid,
  output logic              full,
  output logic              credit,      // one slot freed this cycle
  output logic [PTR_W:0]    count
);

  logic [FLIT_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  rd_ptr, wr_ptr;
  logic              do_push, do_pop;

  assign head_valid = count != '0;
  assign full       = int'(count) == DEPTH;
  assign do_pop     = pop && head_valid;
  assign do_push    = push && !full;
  assign head       = mem[rd_ptr];
  assign credit     = do_pop;

  function automatic logic [PTR_W-1:0] incr(logic [PTR_W-1:0] p);
    return (int'(p) == DEPTH-1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_flit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      count <= count + (PTR_W+1)'(do_push) - (PTR_W+1)'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full))
    else $error("injection_queue: push into a full queue");

endmodule
