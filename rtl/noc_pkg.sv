// noc_pkg: port numbering, sizes and the flit layout shared by the buffer-less
// 3D mesh router and its network.
//
// A router has seven ports. Port 0 is the local node (injection in, ejection
// out); ports 1..4 are the four in-tier neighbours and 5..6 the tiers above and
// below. The numbering of ports 1..6 follows the routing-table generator of the
// original design (left = 1, bottom = 2, right = 3, top = 4, up = 5, down = 6);
// the names WEST/SOUTH/EAST/NORTH are this implementation's.
//
// A router address is z*(MESH*MESH) + y*MESH + x: x counts along the row
// (EAST = x+1), y counts rows (NORTH = y+1) and z counts tiers (UP = z+1).
//
// Flit layout, MSB first: valid, tail, dest, vc, data. Only valid and dest are
// used by the routers; tail, vc and data travel with the flit untouched. The
// router has one virtual channel, so vc is always 0 but is kept to match the
// flit of the generator the design derives from.
package noc_pkg;

  localparam int NPORTS = 7;      // local + 6 network ports
  localparam int NNET   = 6;      // network ports 1..6
  localparam int PORT_W = 3;

  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_WEST  = 3'd1,
    P_SOUTH = 3'd2,
    P_EAST  = 3'd3,
    P_NORTH = 3'd4,
    P_UP    = 3'd5,
    P_DOWN  = 3'd6
  } port_e;

  // Width of a flit with DATA_W payload bits and DEST_W address bits.
  function automatic int flit_width(int data_w, int dest_w);
    return data_w + dest_w + 3;
  endfunction

  // Port on the far side of a link: a flit leaving through EAST arrives on the
  // neighbour's WEST input, and so on.
  function automatic port_e opposite(port_e p);
    case (p)
      P_WEST:  return P_EAST;
      P_EAST:  return P_WEST;
      P_SOUTH: return P_NORTH;
      P_NORTH: return P_SOUTH;
      P_UP:    return P_DOWN;
      P_DOWN:  return P_UP;
      default: return P_LOCAL;
    endcase
  endfunction

endpackage
