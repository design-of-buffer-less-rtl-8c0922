// tb_workloads: the network sizes and traffic the design is evaluated with,
// each run at injection rates from 10% to 100% (3000 cycles per point for the
// 4x4 mesh, 2000 for the larger ones, in steps of 30%):
//   * 4x4 single-tier mesh: uniform, transpose and bit-complement traffic;
//   * 8x8 single-tier mesh and 4x4x4 mesh (all routers 3D): uniform traffic,
//     the pair compared in the 2D/3D comparison;
//   * 4x4x3 mesh with ten 3D routers per tier: uniform traffic.
// Throughput, latency and deflection rate are printed per point; the checks are
// the scoreboards of the harnesses, and the 4x4x4 network must sustain more
// throughput than the 8x8 one at saturation.
module tb_workloads;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0] done;
  int c [4], f [4];
  real pk [4];
  int checks, failures;

  traffic_harness #(.MESH_SIZE(4), .TIERS(1), .PATTERNS(7), .LABEL("4x4"))
    h0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .peak_throughput(pk[0]));
  traffic_harness #(.MESH_SIZE(8), .TIERS(1), .PATTERNS(1), .RATE_LO(10), .RATE_STEP(30), .CYCLES(2000), .LABEL("8x8"))
    h1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .peak_throughput(pk[1]));
  traffic_harness #(.MESH_SIZE(4), .TIERS(4), .PATTERNS(1), .RATE_LO(10), .RATE_STEP(30), .CYCLES(2000), .LABEL("4x4x4"))
    h2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .peak_throughput(pk[2]));
  // ten 3D routers per tier: the four centre routers, the four corners and
  // two more on the diagonal-adjacent middle of the edges
  traffic_harness #(.MESH_SIZE(4), .TIERS(3), .ROUTER3D_MASK(16'b1001_0110_0110_1111), .PATTERNS(1),
                    .RATE_LO(10), .RATE_STEP(30), .CYCLES(2000), .LABEL("4x4x3/10"))
    h3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]), .peak_throughput(pk[3]));

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0]+c[1]+c[2]+c[3], f[0]+f[1]+f[2]+f[3]+1);
    $finish;
  end

  initial begin
    wait (done == 4'hF);
    checks = c[0] + c[1] + c[2] + c[3] + 1;
    failures = f[0] + f[1] + f[2] + f[3];
    if (!(pk[2] > pk[1])) failures++;
    $display("peak throughput: 4x4 %.3f, 8x8 %.3f, 4x4x4 %.3f, 4x4x3/10 %.3f flits/node/cycle",
             pk[0], pk[1], pk[2], pk[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
