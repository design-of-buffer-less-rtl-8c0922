// tb_input_port: random flits into the input of router 21 (x=1, y=1, z=1) of
// the default 4x4x4 mesh. One cycle later the flit register must hold the flit
// and the port register the direction of z-first, then x, then y routing,
// worked out here from the coordinates. Also checks that reset empties it.
module tb_input_port;
  import noc_pkg::*;
  localparam int W = 64 + 6 + 3;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] link_in, flit_q;
  logic deq;
  port_e port_q;
  int checks = 0, failures = 0;

  input_port #(.MESH_SIZE(4), .TIERS(4), .MY_ADDR(21), .DATA_W(64)) dut (.*);

  always #5 clk = ~clk;
  assign deq = flit_q[W-1];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic port_e expect_port(int d);
    int dx, dy, dz;
    dx = d % 4; dy = (d / 4) % 4; dz = d / 16;
    if (dz > 1) return P_UP;
    if (dz < 1) return P_DOWN;
    if (dx > 1) return P_EAST;
    if (dx < 1) return P_WEST;
    if (dy > 1) return P_NORTH;
    if (dy < 1) return P_SOUTH;
    return P_LOCAL;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev;
    link_in = {1'b1, {(W-1){1'b0}}};
    @(posedge clk); #1;
    check(flit_q[W-1] == 1'b0, "reset clears valid");
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      link_in = {$urandom, $urandom, $urandom};
      prev = link_in;
      @(posedge clk); #1;
      check(flit_q == prev, "flit registered");
      check(port_q == expect_port(int'(prev[W-3 -: 6])),
            $sformatf("dest %0d port %0d", prev[W-3 -: 6], port_q));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
