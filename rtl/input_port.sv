// input_port: one network input of the router, a routing-table look-up
// followed by a single pipeline register.
//
// The flit arriving on the link addresses this port's routing table with its
// destination; the flit and the returned output port are captured together at
// the next clock edge (flit register and port register, each one entry deep,
// where a buffered router would have FIFOs). A buffer-less router always sends
// every flit it holds at the end of the cycle, so the registers load a new
// value on every edge; `deq` is the switch's acknowledgement that the held flit
// left, and an assertion checks that no valid flit is ever overwritten without
// it. The look-up-then-register structure follows the document; the
// synchronous reset, which clears the valid bit, is this design's choice.
//
// Timing: link_in at cycle t -> flit_q/port_q visible during cycle t+1.
module input_port
  import noc_pkg::*;
#(
  parameter int MESH_SIZE = 4,
  parameter int TIERS     = 4,
  parameter int MY_ADDR   = 0,
  parameter logic [MESH_SIZE*MESH_SIZE-1:0] ROUTER3D_MASK = '1,
  parameter int DATA_W    = 64,
  localparam int NODES    = MESH_SIZE*MESH_SIZE*TIERS,
  localparam int DEST_W   = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int FLIT_W   = DATA_W + DEST_W + 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [FLIT_W-1:0] link_in,
  input  logic              deq,
  output logic [FLIT_W-1:0] flit_q,
  output port_e             port_q
);

  port_e route_port;

  routing_table #(
    .MESH_SIZE(MESH_SIZE), .TIERS(TIERS), .MY_ADDR(MY_ADDR),
    .ROUTER3D_MASK(ROUTER3D_MASK)
  ) u_table (
    .dest (link_in[FLIT_W-3 -: DEST_W]),
    .port (route_port)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flit_q <= '0;
      port_q <= P_LOCAL;
    end else begin
      flit_q <= link_in;
      port_q <= route_port;
    end
  end

  // A held flit must leave in the cycle it is presented (no buffering).
  assert property (@(posedge clk) disable iff (!rst_n) flit_q[FLIT_W-1] |-> deq)
    else $error("input_port %0d: valid flit was not dequeued", MY_ADDR);

endmodule
