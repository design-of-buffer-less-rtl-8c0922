// traffic_harness: drives one noc_mesh3d of a given size with synthetic
// traffic and measures it. Used by tb_workloads for the network sizes and
// traffic patterns the design is evaluated with.
//
// Every node generates flits with probability RATE% per cycle for CYCLES
// cycles per injection-rate point, under the credit rule of the original test
// setup (push only while more than three queue slots are free). Patterns
// (bits of PATTERNS): 1 uniform random, 2 transpose (address bits rotated by
// half their number), 4 bit complement. Per point it prints the accepted
// throughput in flits per node per cycle, the average latency from push to
// ejection, and deflections per delivered flit. A scoreboard checks every
// delivery, and after the last point the network is drained and every flit
// must have arrived. `done` rises when the run is over.
module traffic_harness #(
  parameter int MESH_SIZE = 4,
  parameter int TIERS     = 1,
  parameter logic [MESH_SIZE*MESH_SIZE-1:0] ROUTER3D_MASK = '1,
  parameter int PATTERNS  = 1,
  parameter int RATE_LO   = 10,
  parameter int RATE_HI   = 100,
  parameter int RATE_STEP = 10,
  parameter int CYCLES    = 3000,
  parameter string LABEL  = "net"
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output real  peak_throughput
);
  localparam int N  = MESH_SIZE*MESH_SIZE*TIERS;
  localparam int DW = (N > 1) ? $clog2(N) : 1;
  localparam int W  = 64 + DW + 3;

  logic rst_n = 0;
  logic [N-1:0] inj_push, inj_full, inj_credit, eject_conflict, injected, inject_productive, inject_stalled;
  logic [W-1:0] inj_flit [N];
  logic [3:0]   inj_count [N];
  logic [W-1:0] ej_flit [N];
  logic [2:0]   n_deflected [N];

  noc_mesh3d #(.MESH_SIZE(MESH_SIZE), .TIERS(TIERS), .ROUTER3D_MASK(ROUTER3D_MASK)) dut (.*);

  longint cycle = 0;
  int credits [N];
  int seqn [N];
  int dest_of_id [int];
  longint sent = 0, recvd = 0, lat_sum = 0, defl = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s: %s", LABEL, what); end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (ej_flit[n][W-1]) begin
        int id;
        id = int'(ej_flit[n][63:32]);
        check(dest_of_id.exists(id) && dest_of_id[id] == n, $sformatf("flit %0h at %0d", id, n));
        if (dest_of_id.exists(id)) dest_of_id.delete(id);
        lat_sum += cycle - longint'(ej_flit[n][31:0]);
        recvd++;
      end
      defl += n_deflected[n];
      if (inj_credit[n]) credits[n]++;
    end
  end

  function automatic int pick_dest(int pattern, int s);
    int d;
    case (pattern)
      1: begin d = int'($urandom_range(0, N-2)); if (d >= s) d++; end
      2: d = ((s << (DW/2)) | (s >> (DW - DW/2))) & ((1 << DW) - 1);
      default: d = (~s) & ((1 << DW) - 1);
    endcase
    return d;
  endfunction

  initial begin
    longint r0, l0, d0;
    real thr;
    done = 0; checks = 0; failures = 0; peak_throughput = 0.0;
    inj_push = '0;
    for (int n = 0; n < N; n++) begin inj_flit[n] = '0; credits[n] = 8; seqn[n] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int pattern = 1; pattern <= 4; pattern <<= 1) begin
      if ((PATTERNS & pattern) == 0) continue;
      for (int rate = RATE_LO; rate <= RATE_HI; rate += RATE_STEP) begin
        r0 = recvd; l0 = lat_sum; d0 = defl;
        for (int c = 0; c < CYCLES; c++) begin
          @(negedge clk); #1;
          for (int s = 0; s < N; s++) begin
            int d;
            inj_push[s] = 1'b0;
            if (int'($urandom_range(0, 99)) < rate) begin
              d = pick_dest(pattern, s);
              if (d != s && d < N && credits[s] > 3) begin
                inj_push[s] = 1'b1;
                inj_flit[s] = {1'b1, seqn[s][0], DW'(d), 1'b0, 12'(s), 20'(seqn[s]), 32'(cycle + 1)};
                dest_of_id[{12'(s), 20'(seqn[s])}] = d;
                seqn[s]++;
                credits[s]--;
                sent++;
              end
            end
          end
        end
        thr = real'(recvd - r0) / (real'(CYCLES) * N);
        if (thr > peak_throughput) peak_throughput = thr;
        $display("%s %s rate %0d%%: throughput %.3f flits/node/cycle, latency %.1f cycles, %.2f deflections/flit",
                 LABEL, pattern == 1 ? "uniform" : pattern == 2 ? "transpose" : "complement", rate, thr,
                 real'(lat_sum - l0) / real'(recvd - r0 + 1), real'(defl - d0) / real'(recvd - r0 + 1));
      end
    end
    @(negedge clk); #1;
    inj_push = '0;
    for (int k = 0; k < 50000 && dest_of_id.size() != 0; k++) @(negedge clk);
    check(dest_of_id.size() == 0, $sformatf("%0d flits not delivered", dest_of_id.size()));
    check(sent == recvd, "sent == received");
    check(defl > 0, "deflections occurred");
    done = 1;
  end
endmodule
