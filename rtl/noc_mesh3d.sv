// noc_mesh3d: a MESH_SIZE x MESH_SIZE x TIERS mesh of buffer-less 3D routers.
//
// Router n sits at x = n % MESH_SIZE, y = (n / MESH_SIZE) % MESH_SIZE,
// z = n / (MESH_SIZE*MESH_SIZE) and connects to its in-tier neighbours in
// all four directions. Vertical links exist only at the positions marked in
// ROUTER3D_MASK (one bit per position of a tier, the same on every tier); a
// router without them is a 2D router, and flits bound for another tier travel
// to the nearest 3D router first. The default is the document's main
// configuration: a 4 x 4 x 4 mesh in which every router is a 3D router, with
// 64-bit payloads.
//
// Each node n sees its router's injection queue (push/flit, full, credit,
// count) and its ejection port (ej_flit, valid bit set on delivery). The flit
// layout is {valid, tail, dest, vc, data} with dest = $clog2(NODES) bits.
// The per-router event outputs report deflections, refused ejections and
// injections every cycle, for measuring deflection and injection rates.
// Unused links at the mesh boundary are tied to zero.
module noc_mesh3d
  import noc_pkg::*;
#(
  parameter int MESH_SIZE = 4,
  parameter int TIERS     = 4,
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
  input  logic [NODES-1:0]  inj_push,
  input  logic [FLIT_W-1:0] inj_flit  [NODES],
  output logic [NODES-1:0]  inj_full,
  output logic [NODES-1:0]  inj_credit,
  output logic [CNT_W-1:0]  inj_count [NODES],
  output logic [FLIT_W-1:0] ej_flit   [NODES],
  output logic [2:0]        n_deflected [NODES],
  output logic [NODES-1:0]  eject_conflict,
  output logic [NODES-1:0]  injected,
  output logic [NODES-1:0]  inject_productive,
  output logic [NODES-1:0]  inject_stalled
);

  localparam int PER_TIER = MESH_SIZE*MESH_SIZE;

  logic [FLIT_W-1:0] lin  [NODES][NNET];
  logic [FLIT_W-1:0] lout [NODES][NNET];

  for (genvar n = 0; n < NODES; n++) begin : g_node
    localparam int X = n % MESH_SIZE;
    localparam int Y = (n % PER_TIER) / MESH_SIZE;
    localparam int Z = n / PER_TIER;
    localparam bit V = ROUTER3D_MASK[X + Y*MESH_SIZE];

    // Input port p (index p-1) is fed by the neighbour's opposite output.
    if (X > 0)           begin : g_w assign lin[n][P_WEST-1]  = lout[n-1][P_EAST-1];  end
    else                 begin : g_w0 assign lin[n][P_WEST-1]  = '0; end
    if (X < MESH_SIZE-1) begin : g_e assign lin[n][P_EAST-1]  = lout[n+1][P_WEST-1];  end
    else                 begin : g_e0 assign lin[n][P_EAST-1]  = '0; end
    if (Y > 0)           begin : g_s assign lin[n][P_SOUTH-1] = lout[n-MESH_SIZE][P_NORTH-1]; end
    else                 begin : g_s0 assign lin[n][P_SOUTH-1] = '0; end
    if (Y < MESH_SIZE-1) begin : g_n assign lin[n][P_NORTH-1] = lout[n+MESH_SIZE][P_SOUTH-1]; end
    else                 begin : g_n0 assign lin[n][P_NORTH-1] = '0; end
    if (V && Z < TIERS-1) begin : g_u assign lin[n][P_UP-1]   = lout[n+PER_TIER][P_DOWN-1]; end
    else                  begin : g_u0 assign lin[n][P_UP-1]   = '0; end
    if (V && Z > 0)       begin : g_d assign lin[n][P_DOWN-1] = lout[n-PER_TIER][P_UP-1]; end
    else                  begin : g_d0 assign lin[n][P_DOWN-1] = '0; end

    router3d #(
      .MESH_SIZE(MESH_SIZE), .TIERS(TIERS), .MY_ADDR(n),
      .ROUTER3D_MASK(ROUTER3D_MASK), .DATA_W(DATA_W), .INJ_DEPTH(INJ_DEPTH)
    ) u_router (
      .clk, .rst_n,
      .link_in           (lin[n]),
      .link_out          (lout[n]),
      .inj_push          (inj_push[n]),
      .inj_flit          (inj_flit[n]),
      .inj_full          (inj_full[n]),
      .inj_credit        (inj_credit[n]),
      .inj_count         (inj_count[n]),
      .ej_flit           (ej_flit[n]),
      .n_deflected       (n_deflected[n]),
      .eject_conflict    (eject_conflict[n]),
      .injected          (injected[n]),
      .inject_productive (inject_productive[n]),
      .inject_stalled    (inject_stalled[n])
    );
  end

endmodule
