// routing_table: the output-port look-up table of one router input port.
//
// Every input port of a router owns one table with an entry per router of the
// network; the entry addressed by a flit's destination is the port that moves
// the flit one hop closer. The table contents depend only on the position of
// the router that holds it, so they are computed here at elaboration time (the
// original flow generated them as memory files from a script; the rule is the
// same):
//   * destination on another tier: travel to the nearest 3D router of this
//     tier (Manhattan distance; ties go to the lowest index), x before y; once
//     there, take UP or DOWN.
//   * destination on this tier: x first (EAST/WEST), then y (NORTH/SOUTH).
//   * destination is this router: LOCAL.
// With every router a 3D router (the default mask) this is z-first routing.
// The table is read asynchronously, as a distributed RAM would be: port is a
// combinational function of dest. ROUTER3D_MASK has one bit per position of a
// tier (bit x + y*MESH_SIZE); all tiers share it. A mask without any 3D router
// is only meaningful when TIERS = 1.
module routing_table
  import noc_pkg::*;
#(
  parameter int MESH_SIZE = 4,
  parameter int TIERS     = 4,
  parameter int MY_ADDR   = 0,
  parameter logic [MESH_SIZE*MESH_SIZE-1:0] ROUTER3D_MASK = '1,
  localparam int NODES    = MESH_SIZE*MESH_SIZE*TIERS,
  localparam int DEST_W   = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic [DEST_W-1:0] dest,
  output port_e             port
);

  localparam int PER_TIER = MESH_SIZE*MESH_SIZE;

  // Nearest 3D router of the tier, as an in-tier index.
  function automatic int nearest_3d(int cx, int cy);
    int best, best_hops, hops;
    best = cx + cy*MESH_SIZE;
    best_hops = 1 << 30;
    for (int r = 0; r < PER_TIER; r++) begin
      if (ROUTER3D_MASK[r]) begin
        hops = ((r % MESH_SIZE) > cx ? (r % MESH_SIZE) - cx : cx - (r % MESH_SIZE)) +
               ((r / MESH_SIZE) > cy ? (r / MESH_SIZE) - cy : cy - (r / MESH_SIZE));
        if (hops < best_hops) begin
          best_hops = hops;
          best = r;
        end
      end
    end
    return best;
  endfunction

  function automatic port_e route(int cur, int dst);
    int cx, cy, cz, dx, dy, dz, tx, ty, r3;
    cx = cur % MESH_SIZE;  cy = (cur % PER_TIER) / MESH_SIZE;  cz = cur / PER_TIER;
    dx = dst % MESH_SIZE;  dy = (dst % PER_TIER) / MESH_SIZE;  dz = dst / PER_TIER;
    if (cur == dst) return P_LOCAL;
    if (dz != cz) begin
      r3 = nearest_3d(cx, cy);
      tx = r3 % MESH_SIZE;
      ty = r3 / MESH_SIZE;
      if (tx == cx && ty == cy) return (dz > cz) ? P_UP : P_DOWN;
    end else begin
      tx = dx;
      ty = dy;
    end
    if (tx > cx) return P_EAST;
    if (tx < cx) return P_WEST;
    if (ty > cy) return P_NORTH;
    return P_SOUTH;
  endfunction

  function automatic logic [NODES*PORT_W-1:0] build_table();
    logic [NODES*PORT_W-1:0] t;
    for (int d = 0; d < NODES; d++) t[d*PORT_W +: PORT_W] = route(MY_ADDR, d);
    return t;
  endfunction

  localparam logic [NODES*PORT_W-1:0] TABLE = build_table();

  // Addresses beyond the network (possible only when NODES is not a power of
  // two) read as LOCAL.
  always_comb begin
    if (int'(dest) < NODES) port = port_e'(TABLE[dest*PORT_W +: PORT_W]);
    else                    port = P_LOCAL;
  end

endmodule
