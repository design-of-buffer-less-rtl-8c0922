// tb_routing_table: checks the routing tables of two whole networks.
//
// Network A is the default 4x4x4 mesh with every router 3D; network B is a
// 3x3x2 mesh whose only 3D routers are at positions 0 and 4 of each tier. All
// tables read the same destination; for every (source, destination) pair the
// testbench walks the path the tables describe and checks that it ends at the
// destination after exactly the minimal number of hops of the intended rule
// (A: |dx|+|dy|+|dz|; B: to the nearest 3D router, vertical, then to the
// destination), plus a set of hand-worked entries.
module tb_routing_table;
  import noc_pkg::*;

  localparam int AM = 4, AT = 4, AN = AM*AM*AT;
  localparam int BM = 3, BT = 2, BN = BM*BM*BT;
  localparam logic [BM*BM-1:0] BMASK = 9'b0_0001_0001;

  logic [5:0] dest_a;
  logic [4:0] dest_b;
  port_e pa [AN];
  port_e pb [BN];
  int checks = 0, failures = 0;

  for (genvar n = 0; n < AN; n++) begin : g_a
    routing_table #(.MESH_SIZE(AM), .TIERS(AT), .MY_ADDR(n)) u (.dest(dest_a), .port(pa[n]));
  end
  for (genvar n = 0; n < BN; n++) begin : g_b
    routing_table #(.MESH_SIZE(BM), .TIERS(BT), .MY_ADDR(n), .ROUTER3D_MASK(BMASK))
      u (.dest(dest_b), .port(pb[n]));
  end

  function automatic int absd(int a, int b); return a > b ? a - b : b - a; endfunction

  function automatic int step(int n, port_e p, int m);
    case (p)
      P_WEST:  return n - 1;
      P_EAST:  return n + 1;
      P_SOUTH: return n - m;
      P_NORTH: return n + m;
      P_UP:    return n + m*m;
      P_DOWN:  return n - m*m;
      default: return n;
    endcase
  endfunction

  function automatic int dist2(int a, int b, int m);
    return absd(a % m, b % m) + absd((a % (m*m)) / m, (b % (m*m)) / m);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---- network A ----
    for (int d = 0; d < AN; d++) begin
      dest_a = 6'(d);
      #1;
      for (int s = 0; s < AN; s++) begin
        int cur, hops, want;
        cur = s; hops = 0;
        while (cur != d && hops < 50) begin
          cur = step(cur, pa[cur], AM);
          hops++;
        end
        want = dist2(s, d, AM) + absd(s / (AM*AM), d / (AM*AM));
        check(cur == d && hops == want, $sformatf("A %0d->%0d hops %0d want %0d", s, d, hops, want));
        // the vertical move comes first
        if (s / (AM*AM) != d / (AM*AM))
          check(pa[s] == (d > s ? P_UP : P_DOWN), $sformatf("A z-first %0d->%0d", s, d));
        // on the same tier x comes before y
        else if (s % AM != d % AM)
          check(pa[s] == (d % AM > s % AM ? P_EAST : P_WEST), $sformatf("A x-first %0d->%0d", s, d));
      end
    end
    // hand-worked entries of network A
    dest_a = 6'd22; #1; check(pa[21] == P_EAST,  "A 21->22 EAST");
    dest_a = 6'd4;  #1; check(pa[5]  == P_WEST,  "A 5->4 WEST");
    dest_a = 6'd1;  #1; check(pa[5]  == P_SOUTH, "A 5->1 SOUTH");
    dest_a = 6'd9;  #1; check(pa[5]  == P_NORTH, "A 5->9 NORTH");
    dest_a = 6'd5;  #1; check(pa[21] == P_DOWN,  "A 21->5 DOWN");
                        check(pa[5]  == P_LOCAL, "A 5->5 LOCAL");
    dest_a = 6'd15; #1; check(pa[0]  == P_EAST,  "A 0->15 x before y");

    // ---- network B ----
    for (int d = 0; d < BN; d++) begin
      dest_b = 5'(d);
      #1;
      for (int s = 0; s < BN; s++) begin
        int cur, hops, want, best, bh;
        cur = s; hops = 0;
        while (cur != d && hops < 50) begin
          cur = step(cur, pb[cur], BM);
          hops++;
        end
        if (s / (BM*BM) == d / (BM*BM)) want = dist2(s, d, BM);
        else begin
          bh = 1000;
          best = 0;
          for (int r = 0; r < BM*BM; r++)
            if (BMASK[r] && dist2(s % (BM*BM), r, BM) < bh) begin
              bh = dist2(s % (BM*BM), r, BM);
              best = r;
            end
          want = bh + 1 + dist2(best, d % (BM*BM), BM);
        end
        check(cur == d && hops == want, $sformatf("B %0d->%0d hops %0d want %0d", s, d, hops, want));
      end
    end
    // hand-worked entries of network B (3D routers at positions 0 and 4)
    dest_b = 5'd9;  #1; check(pb[0] == P_UP,   "B 0->9 UP at 3D router");
                        check(pb[2] == P_WEST, "B 2->9 tie resolved to router 0");
                        check(pb[8] == P_WEST, "B 8->9 toward router 4");
                        check(pb[7] == P_SOUTH, "B 7->9 toward router 4");
    dest_b = 5'd2;  #1; check(pb[13] == P_DOWN, "B 13->2 DOWN at 3D router");
                        check(pb[1] == P_EAST,  "B 1->2 same tier");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
