// tb_noc_mesh3d: end-to-end test of the default network (4x4x4 mesh, every
// router 3D, 64-bit payloads), instantiated without parameter overrides.
//
// Each node runs a traffic generator with the credit rule of the original test
// setup: it may push a flit only while more than three injection-queue slots
// are free (it counts them itself from the credits). Every flit carries its
// source, a sequence number and its push cycle in the payload; a scoreboard
// checks that each flit arrives exactly once, at the right node, unchanged.
// Phases:
//   1. zero load: single flits between chosen node pairs; the latency from
//      push to ejection must equal the hop count (one cycle per hop);
//   2. uniform random traffic at rising injection rates;
//   3. transpose and bit-complement traffic;
//   4. drain: injection stops and every flit must be delivered.
// The mechanisms of the design are counted and each must occur at least once:
// deflection, refused ejection, deflected injection, injection stall,
// generator held back by missing credits, and vertical (inter-tier) delivery.
module tb_noc_mesh3d;
  localparam int M = 4, T = 4, N = M*M*T, DW = 6, W = 64 + DW + 3;
  localparam int DEPTH = 8;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] inj_push, inj_full, inj_credit, eject_conflict, injected, inject_productive, inject_stalled;
  logic [W-1:0] inj_flit [N];
  logic [3:0]   inj_count [N];
  logic [W-1:0] ej_flit [N];
  logic [2:0]   n_deflected [N];

  noc_mesh3d dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int credits [N];
  int seqn [N];
  int dest_of_id [int];        // outstanding flits: id -> destination
  longint sent = 0, recvd = 0, lat_sum = 0;
  longint c_defl = 0, c_ejc = 0, c_injd = 0, c_stall = 0, c_nocredit = 0, c_vert = 0;
  int last_lat;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int hops(int s, int d);
    int h;
    h = 0;
    h += (s % M > d % M) ? s % M - d % M : d % M - s % M;
    h += ((s / M) % M > (d / M) % M) ? (s / M) % M - (d / M) % M : (d / M) % M - (s / M) % M;
    h += (s / (M*M) > d / (M*M)) ? s / (M*M) - d / (M*M) : d / (M*M) - s / (M*M);
    return h;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // ---- ejection side: scoreboard and event counters ----
  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (ej_flit[n][W-1]) begin
        int id, src;
        longint pc;
        id  = int'(ej_flit[n][63:32]);
        src = int'(ej_flit[n][63:56]);
        pc  = longint'(ej_flit[n][31:0]);
        check(dest_of_id.exists(id), $sformatf("unknown or duplicate flit %0h at %0d", id, n));
        if (dest_of_id.exists(id)) begin
          check(dest_of_id[id] == n, $sformatf("flit %0h delivered to %0d", id, n));
          check(int'(ej_flit[n][W-3 -: DW]) == n, "dest field");
          dest_of_id.delete(id);
        end
        last_lat = int'(cycle - pc);
        lat_sum += cycle - pc;
        recvd++;
        if (src / (M*M) != n / (M*M)) c_vert++;
      end
      c_defl  += n_deflected[n];
      c_ejc   += eject_conflict[n];
      c_injd  += injected[n] && !inject_productive[n];
      c_stall += inject_stalled[n];
      if (inj_credit[n]) credits[n]++;
    end
  end

  task automatic push_flit(int s, int d, bit tail);
    inj_push[s] = 1'b1;
    inj_flit[s] = {1'b1, tail, DW'(d), 1'b0, 8'(s), 24'(seqn[s]), 32'(cycle + 1)};
    dest_of_id[{8'(s), 24'(seqn[s])}] = d;
    seqn[s]++;
    credits[s]--;
    sent++;
  endtask

  // Drives one cycle of traffic; pattern 0 uniform, 1 transpose, 2 complement.
  task automatic traffic_cycle(int pattern, int rate_pct);
    @(negedge clk);
    #1;
    for (int s = 0; s < N; s++) begin
      int d;
      inj_push[s] = 1'b0;
      if (int'($urandom_range(0, 99)) < rate_pct) begin
        case (pattern)
          0: begin d = int'($urandom_range(0, N-2)); if (d >= s) d++; end
          1: d = ((s & 7) << 3) | (s >> 3);
          default: d = (~s) & (N-1);
        endcase
        if (d != s) begin
          if (credits[s] > 3) push_flit(s, d, seqn[s][0]);
          else c_nocredit++;
        end
      end
    end
  endtask

  task automatic idle_until_empty(int limit);
    @(negedge clk); #1;
    inj_push = '0;
    for (int k = 0; k < limit && dest_of_id.size() != 0; k++) @(negedge clk);
  endtask

  initial begin
    int pairs [8][2] = '{'{0, 63}, '{63, 0}, '{5, 6}, '{21, 42}, '{15, 48}, '{0, 3}, '{12, 60}, '{37, 26}};
    longint s0, r0, l0;
    inj_push = '0;
    for (int n = 0; n < N; n++) begin inj_flit[n] = '0; credits[n] = DEPTH; seqn[n] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. zero-load latency
    foreach (pairs[k]) begin
      @(negedge clk); #1;
      push_flit(pairs[k][0], pairs[k][1], 1'b1);
      @(negedge clk); #1;
      inj_push = '0;
      idle_until_empty(100);
      check(dest_of_id.size() == 0, "zero-load flit delivered");
      check(last_lat == hops(pairs[k][0], pairs[k][1]),
            $sformatf("zero-load latency %0d->%0d: %0d cycles, %0d hops",
                      pairs[k][0], pairs[k][1], last_lat, hops(pairs[k][0], pairs[k][1])));
    end

    // 2. uniform random traffic at rising injection rates
    for (int rate = 10; rate <= 100; rate += 30) begin
      s0 = sent; r0 = recvd; l0 = lat_sum;
      for (int c = 0; c < 1000; c++) traffic_cycle(0, rate);
      $display("uniform rate %0d%%: accepted %.3f flits/node/cycle, avg latency %.1f cycles",
               rate, real'(recvd - r0) / (1000.0 * N), real'(lat_sum - l0) / real'(recvd - r0));
    end
    // 3. transpose and bit complement
    for (int pat = 1; pat <= 2; pat++) begin
      s0 = sent; r0 = recvd; l0 = lat_sum;
      for (int c = 0; c < 1000; c++) traffic_cycle(pat, 50);
      $display("%s rate 50%%: accepted %.3f flits/node/cycle, avg latency %.1f cycles",
               pat == 1 ? "transpose" : "complement",
               real'(recvd - r0) / (1000.0 * N), real'(lat_sum - l0) / real'(recvd - r0));
    end

    // 4. drain
    idle_until_empty(20000);
    check(dest_of_id.size() == 0, $sformatf("%0d flits never delivered", dest_of_id.size()));
    check(sent == recvd, "every flit delivered once");
    for (int n = 0; n < N; n++) check(credits[n] == DEPTH, "all credits returned");

    check(c_defl > 0,     "deflection happened");
    check(c_ejc > 0,      "refused ejection happened");
    check(c_injd > 0,     "deflected injection happened");
    check(c_stall > 0,    "injection stall happened");
    check(c_nocredit > 0, "credit back-pressure happened");
    check(c_vert > 0,     "inter-tier delivery happened");
    $display("sent %0d received %0d; deflections %0d, refused ejections %0d, deflected injections %0d, injection stalls %0d, held back by credits %0d, inter-tier deliveries %0d",
             sent, recvd, c_defl, c_ejc, c_injd, c_stall, c_nocredit, c_vert);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
