// allocator: output-port allocation of the 3D buffer-less router.
//
// Allocation runs in two sequential combinational stages inside the single
// router cycle, followed by late injection:
//   1. The eject unit (round robin) gives the local output to one flit that
//      has arrived; in parallel the static output arbiter (fixed priority)
//      gives each network output to one flit that asked for it.
//   2. Every network flit left without a port (it lost the static arbiter, or
//      it lost ejection) is deflected by the deflection unit to a network port
//      that exists and is still free.
//   3. The inject unit offers any port still free to the local node's flit.
// The split into eject unit and static output arbiter feeding a deflection
// unit, and injection only into ports left over, follow the document; the
// priority orders inside each stage are this implementation's choices.
// Since a router has as many existing output links as input links, a flit that
// arrived always finds a port; `unserved` reports a violation and an assertion
// checks it.
//
// Interface: index 0 of valid/port is the local (injection) input, 1..6 the
// network inputs. avail[o] says whether network output o+1 has a link (edge
// routers and 2D routers have fewer). gnt[i] is a one-hot vector over the
// seven outputs (bit 0 = local); all zero when input i is not served.
module allocator
  import noc_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NPORTS-1:0]       valid,
  input  port_e                   port [NPORTS],
  input  logic [NNET-1:0]         avail,
  output logic [NPORTS-1:0][NPORTS-1:0] gnt,
  output logic [2:0]              n_deflected,    // network flits deflected
  output logic                    eject_conflict, // an ejection was refused
  output logic                    injected,
  output logic                    inject_productive,
  output logic                    inject_stalled,
  output logic                    unserved        // must never be set
);

  logic [NNET-1:0]            ej_req, ej_gnt;
  logic [NNET-1:0][NNET-1:0]  st_req, st_gnt, df_gnt;
  logic [NNET-1:0]            taken, need, free, free_left, left_out, inj_gnt;

  always_comb begin
    for (int i = 0; i < NNET; i++) begin
      ej_req[i] = valid[i+1] && port[i+1] == P_LOCAL;
      for (int o = 0; o < NNET; o++)
        st_req[i][o] = valid[i+1] && int'(port[i+1]) == o + 1;
    end
  end

  eject_unit #(.N(NNET)) u_eject (
    .clk, .rst_n, .req(ej_req), .gnt(ej_gnt), .any_conflict(eject_conflict)
  );

  static_output_arbiter #(.N(NNET)) u_static (
    .req(st_req), .gnt(st_gnt), .taken(taken)
  );

  always_comb begin
    for (int i = 0; i < NNET; i++)
      need[i] = valid[i+1] && !ej_gnt[i] && (st_gnt[i] == '0);
    free = avail & ~taken;
  end

  deflection_unit #(.N(NNET)) u_deflect (
    .need(need), .free(free), .gnt(df_gnt), .free_out(free_left), .unserved(left_out)
  );

  inject_unit #(.N(NNET)) u_inject (
    .valid(valid[0]), .port(port[0]), .free(free_left), .gnt(inj_gnt),
    .injected(injected), .productive(inject_productive), .stalled(inject_stalled)
  );

  always_comb begin
    gnt = '0;
    gnt[0] = {inj_gnt, 1'b0};
    for (int i = 0; i < NNET; i++)
      gnt[i+1] = {st_gnt[i] | df_gnt[i], ej_gnt[i]};
    n_deflected = '0;
    for (int i = 0; i < NNET; i++)
      n_deflected = n_deflected + 3'(need[i]);
    unserved = left_out != '0;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !unserved)
    else $error("allocator: a network flit found no output port");
  assert property (@(posedge clk) disable iff (!rst_n) !(valid[0] && port[0] == P_LOCAL))
    else $error("allocator: injected flit addressed to its own node");

endmodule
