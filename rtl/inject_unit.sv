// inject_unit: last allocation stage; lets the local node put a flit into the
// network when a network port is left over.
//
// Injection is late: it only sees the ports that neither the static output
// arbiter nor the deflection unit used for flits already in the network, so a
// flit in flight is never displaced by a new one. If the productive port of the
// waiting local flit is among the free ones it is used; otherwise the flit is
// injected through the lowest-numbered free port (a deflected injection, as the
// document allows). With no free port the flit stays in the injection queue.
// Combinational.
//
// Interface: valid/port describe the head of the injection queue (port is its
// routing-table result, one of the network ports); free[j] is network port j+1.
module inject_unit
  import noc_pkg::*;
#(
  parameter int N = 6
) (
  input  logic         valid,
  input  port_e        port,
  input  logic [N-1:0] free,
  output logic [N-1:0] gnt,          // one-hot: network port used
  output logic         injected,
  output logic         productive,   // injected into its productive port
  output logic         stalled       // flit waiting, no port free
);

  always_comb begin
    int want;
    gnt        = '0;
    productive = 1'b0;
    want       = int'(port) - 1;
    if (valid) begin
      if (want >= 0 && want < N && free[want]) begin
        gnt[want]  = 1'b1;
        productive = 1'b1;
      end else begin
        for (int j = N-1; j >= 0; j--) begin
          if (free[j]) gnt = N'(1) << j;
        end
      end
    end
    injected = gnt != '0;
    stalled  = valid && !injected;
  end

endmodule
