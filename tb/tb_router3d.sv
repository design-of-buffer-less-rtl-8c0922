// tb_router3d: two routers of the default 4x4x4 mesh, driven directly on their
// links: router 21 (inner, all six links) and router 0 (corner of the bottom
// tier: no WEST, SOUTH or DOWN link). Random flits arrive on every existing
// link; the local node pushes random flits into the injection queue.
// Checks, one cycle after the flits arrive:
//   * every arrived flit leaves exactly once (link or ejection), unchanged;
//   * an ejected flit is addressed to this router, and one is ejected whenever
//     one arrived for it;
//   * every productive direction that some arrived flit asked for is used by
//     such a flit (no needless deflection);
//   * absent links carry nothing;
//   * the injection queue delivers its flits in order, only into ports left
//     free, and returns one credit per injected flit.
module tb_router3d;
  import noc_pkg::*;
  localparam int W = 64 + 6 + 3;
  localparam int NR = 2;
  localparam int ADDR [NR] = '{21, 0};

  logic clk = 0, rst_n = 0;
  logic [W-1:0] lin  [NR][NNET];
  logic [W-1:0] lout [NR][NNET];
  logic [NR-1:0] push, full, credit;
  logic [W-1:0] pflit [NR];
  logic [3:0] cnt [NR];
  logic [W-1:0] ej [NR];
  logic [2:0] ndef [NR];
  logic [NR-1:0] ejc, inj, injp, injs;
  int checks = 0, failures = 0;
  int n_defl = 0, n_ejc = 0, n_inj = 0, n_injd = 0, n_stall = 0, n_ej = 0, n_full = 0;

  for (genvar r = 0; r < NR; r++) begin : g_r
    router3d #(.MY_ADDR(ADDR[r])) dut (
      .clk, .rst_n,
      .link_in(lin[r]), .link_out(lout[r]),
      .inj_push(push[r]), .inj_flit(pflit[r]), .inj_full(full[r]), .inj_credit(credit[r]),
      .inj_count(cnt[r]), .ej_flit(ej[r]),
      .n_deflected(ndef[r]), .eject_conflict(ejc[r]), .injected(inj[r]),
      .inject_productive(injp[r]), .inject_stalled(injs[r])
    );
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic port_e route(int me, int d);
    int mx, my, mz, dx, dy, dz;
    mx = me % 4; my = (me / 4) % 4; mz = me / 16;
    dx = d % 4;  dy = (d / 4) % 4;  dz = d / 16;
    if (dz > mz) return P_UP;
    if (dz < mz) return P_DOWN;
    if (dx > mx) return P_EAST;
    if (dx < mx) return P_WEST;
    if (dy > my) return P_NORTH;
    if (dy < my) return P_SOUTH;
    return P_LOCAL;
  endfunction

  function automatic bit exists(int me, int p);
    int mx, my, mz;
    mx = me % 4; my = (me / 4) % 4; mz = me / 16;
    case (p)
      1: return mx > 0;
      2: return my > 0;
      3: return mx < 3;
      4: return my < 3;
      5: return mz < 3;
      6: return mz > 0;
      default: return 1;
    endcase
  endfunction

  function automatic int dest_of(logic [W-1:0] f); return int'(f[W-3 -: 6]); endfunction

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] held [NR][NNET];
    logic [W-1:0] qmodel [NR][$];
    int seq;
    seq = 1;
    for (int r = 0; r < NR; r++) begin
      for (int p = 0; p < NNET; p++) begin lin[r][p] = '0; held[r][p] = '0; end
      push[r] = 0; pflit[r] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      // ---- drive the next cycle ----
      for (int r = 0; r < NR; r++) begin
        int load;
        load = (t / 500) % 3;   // light, medium, heavy phases
        for (int p = 0; p < NNET; p++) begin
          lin[r][p] = '0;
          if (exists(ADDR[r], p + 1) && $urandom_range(0, 9) < 3 + 3*load) begin
            int d;
            d = int'($urandom_range(0, 63));
            if ($urandom_range(0, 3) == 0) d = ADDR[r];
            lin[r][p] = {1'b1, 1'b1, 6'(d), 1'b0, 32'(seq), 32'(r)};
            seq++;
          end
        end
        push[r] = !full[r] && ($urandom_range(0, 9) < 2 + 3*load);
        begin
          int d;
          d = int'($urandom_range(0, 63));
          if (d == ADDR[r]) d = (d + 1) % 64;
          pflit[r] = {1'b1, 1'b1, 6'(d), 1'b0, 32'(seq), 32'(100 + r)};
          seq++;
        end
      end
      @(posedge clk);
      for (int r = 0; r < NR; r++) begin
        for (int p = 0; p < NNET; p++) held[r][p] = lin[r][p];
        if (push[r]) qmodel[r].push_back(pflit[r]);
      end
      #1;
      for (int r = 0; r < NR; r++) if (full[r]) n_full++;
      // ---- check the outputs of this cycle ----
      for (int r = 0; r < NR; r++) begin
        int found, nout, want_local;
        bit asked [7];
        logic [W-1:0] head;
        for (int o = 0; o < 7; o++) asked[o] = 0;
        want_local = 0;
        // each held flit leaves exactly once
        for (int p = 0; p < NNET; p++) begin
          if (held[r][p][W-1]) begin
            found = 0;
            for (int o = 0; o < NNET; o++) if (lout[r][o] == held[r][p]) found++;
            if (ej[r] == held[r][p]) found++;
            check(found == 1, $sformatf("r%0d t=%0d flit on port %0d left %0d times", ADDR[r], t, p+1, found));
            asked[int'(route(ADDR[r], dest_of(held[r][p])))] = 1;
            if (dest_of(held[r][p]) == ADDR[r]) want_local++;
          end
        end
        // ejection
        check(ej[r][W-1] == (want_local > 0), "eject when a flit arrived for this node");
        if (ej[r][W-1]) begin check(dest_of(ej[r]) == ADDR[r], "ejected flit is ours"); n_ej++; end
        check(ejc[r] == (want_local > 1), "eject conflict flag");
        // productive ports used by flits that wanted them
        for (int o = 1; o < 7; o++) begin
          if (!exists(ADDR[r], o)) check(lout[r][o-1] == '0, "absent link stays idle");
          if (asked[o]) check(lout[r][o-1][W-1] && int'(route(ADDR[r], dest_of(lout[r][o-1]))) == o,
                             $sformatf("r%0d t=%0d port %0d not given to a flit that wanted it", ADDR[r], t, o));
        end
        // injection
        nout = 0;
        for (int o = 0; o < NNET; o++) nout += int'(lout[r][o][W-1]);
        if (qmodel[r].size() > 0) begin
          head = qmodel[r][0];
          found = 0;
          for (int o = 0; o < NNET; o++) if (lout[r][o] == head) found++;
          check(found == int'(inj[r]), "injected flit is the queue head");
          check(credit[r] == inj[r], "credit per injected flit");
          if (inj[r]) begin
            void'(qmodel[r].pop_front());
            n_inj++;
            if (!injp[r]) n_injd++;
          end else n_stall++;
        end else check(!inj[r], "no injection from an empty queue");
        n_defl += int'(ndef[r]);
        n_ejc  += int'(ejc[r]);
      end
      @(negedge clk);
    end
    check(n_defl > 0 && n_ejc > 0 && n_inj > 0 && n_injd > 0 && n_stall > 0 && n_full > 0,
          "all mechanisms exercised");
    $display("ejected %0d, deflected %0d, refused ejections %0d, injected %0d (%0d deflected), stalled %0d, queue-full cycles %0d",
             n_ej, n_defl, n_ejc, n_inj, n_injd, n_stall, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
