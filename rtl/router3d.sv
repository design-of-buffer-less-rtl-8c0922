// router3d: single-stage buffer-less deflection router for a 3D mesh.
//
// Seven ports: local (0), WEST (1), SOUTH (2), EAST (3), NORTH (4), UP (5) and
// DOWN (6). Every network input has a routing table and one pipeline register
// for the flit and its requested port; the local input is the injection queue,
// whose head is looked up in the router's seventh routing table. In every
// cycle all flits held in the input registers leave: the allocator ejects one
// flit to the node, gives productive ports by fixed priority, deflects the rest
// to free ports, and injects the local flit into a port left over; the
// switch_encoder then moves the flits. There is no back-pressure between
// routers; only the injection queue returns credits to the node.
//
// Timing: a flit on link_in at cycle t is registered at the edge and leaves on
// link_out (or ej_flit) during cycle t+1, so one hop costs one cycle. The queue
// head is injected combinationally in the cycle it is first visible.
//
// Links that do not exist (mesh edges; UP/DOWN of a 2D router or of the top and
// bottom tiers) are never used for deflection or injection. Their link_in must
// be tied to zero. The router is the document's 3D design; its 6 x 6 deflection
// matrix, fixed priority order and round-robin pointer are described in the
// sub-modules. With TIERS = 1 it behaves as the 2D five-port router with two
// unused ports.
module router3d
  import noc_pkg::*;
#(
  parameter int MESH_SIZE = 4,
  parameter int TIERS     = 4,
  parameter int MY_ADDR   = 0,
  parameter logic [MESH_SIZE*MESH_SIZE-1:0] ROUTER3D_MASK = '1,
  parameter int DATA_W    = 64,
  parameter int INJ_DEPTH = 8,
  localparam int NODES    = MESH_SIZE*MESH_SIZE*TIERS,
  localparam int DEST_W   = (NODES > 1) ? $clog2(NODES) : 1,
  localparam int FLIT_W   = DATA_W + DEST_W + 3,
  localparam int CNT_W    = $clog2(INJ_DEPTH) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // network links, index 0..5 = ports WEST..DOWN
  input  logic [FLIT_W-1:0] link_in  [NNET],
  output logic [FLIT_W-1:0] link_out [NNET],
  // local node: injection
  input  logic              inj_push,
  input  logic [FLIT_W-1:0] inj_flit,
  output logic              inj_full,
  output logic              inj_credit,
  output logic [CNT_W-1:0]  inj_count,
  // local node: ejection (valid bit of the flit marks a delivery)
  output logic [FLIT_W-1:0] ej_flit,
  // per-cycle event indicators
  output logic [2:0]        n_deflected,
  output logic              eject_conflict,
  output logic              injected,
  output logic              inject_productive,
  output logic              inject_stalled
);

  localparam int PER_TIER = MESH_SIZE*MESH_SIZE;
  localparam int MX = MY_ADDR % MESH_SIZE;
  localparam int MY = (MY_ADDR % PER_TIER) / MESH_SIZE;
  localparam int MZ = MY_ADDR / PER_TIER;
  localparam bit IS3D = ROUTER3D_MASK[MX + MY*MESH_SIZE];

  // Which outputs have a link (bit o = port o+1).
  localparam logic [NNET-1:0] AVAIL = {
    IS3D && MZ > 0,            // DOWN
    IS3D && MZ < TIERS-1,      // UP
    MY < MESH_SIZE-1,          // NORTH
    MX < MESH_SIZE-1,          // EAST
    MY > 0,                    // SOUTH
    MX > 0                     // WEST
  };

  logic [FLIT_W-1:0] flit_q [NPORTS];
  port_e             port_q [NPORTS];
  logic [NPORTS-1:0] valid_q;
  logic [NPORTS-1:0][NPORTS-1:0] gnt;
  logic [NPORTS-1:0] deq;
  logic [FLIT_W-1:0] flit_out [NPORTS];
  logic [FLIT_W-1:0] q_head;
  logic              q_valid;

  // ---- local input: injection queue + routing table ----
  injection_queue #(.FLIT_W(FLIT_W), .DEPTH(INJ_DEPTH)) u_injq (
    .clk, .rst_n,
    .push(inj_push), .push_flit(inj_flit),
    .pop(deq[0]), .head(q_head), .head_valid(q_valid),
    .full(inj_full), .credit(inj_credit), .count(inj_count)
  );

  routing_table #(
    .MESH_SIZE(MESH_SIZE), .TIERS(TIERS), .MY_ADDR(MY_ADDR),
    .ROUTER3D_MASK(ROUTER3D_MASK)
  ) u_local_table (
    .dest (q_head[FLIT_W-3 -: DEST_W]),
    .port (port_q[0])
  );

  assign flit_q[0]  = q_valid ? q_head : '0;
  assign valid_q[0] = q_valid;

  // ---- network inputs: routing table + pipeline register ----
  for (genvar p = 1; p < NPORTS; p++) begin : g_in
    input_port #(
      .MESH_SIZE(MESH_SIZE), .TIERS(TIERS), .MY_ADDR(MY_ADDR),
      .ROUTER3D_MASK(ROUTER3D_MASK), .DATA_W(DATA_W)
    ) u_in (
      .clk, .rst_n,
      .link_in (link_in[p-1]),
      .deq     (deq[p]),
      .flit_q  (flit_q[p]),
      .port_q  (port_q[p])
    );
    assign valid_q[p] = flit_q[p][FLIT_W-1];
  end

  // ---- allocation and switch ----
  allocator u_alloc (
    .clk, .rst_n,
    .valid(valid_q), .port(port_q), .avail(AVAIL),
    .gnt(gnt),
    .n_deflected(n_deflected), .eject_conflict(eject_conflict),
    .injected(injected), .inject_productive(inject_productive),
    .inject_stalled(inject_stalled), .unserved()
  );

  switch_encoder #(.FLIT_W(FLIT_W)) u_switch (
    .gnt(gnt), .flit_in(flit_q), .deq(deq), .flit_out(flit_out)
  );

  assign ej_flit = flit_out[0];
  for (genvar p = 1; p < NPORTS; p++) begin : g_out
    assign link_out[p-1] = flit_out[p];
  end

  // The node must push flits with their valid bit set.
  assert property (@(posedge clk) disable iff (!rst_n) inj_push |-> inj_flit[FLIT_W-1])
    else $error("router %0d: pushed flit without valid bit", MY_ADDR);

  // Flits arriving on a link that does not exist would be lost.
  for (genvar p = 1; p < NPORTS; p++) begin : g_chk
    if (!AVAIL[p-1]) begin : g_absent
      assert property (@(posedge clk) disable iff (!rst_n) !valid_q[p])
        else $error("router %0d: flit on absent port %0d", MY_ADDR, p);
    end
  end

endmodule
