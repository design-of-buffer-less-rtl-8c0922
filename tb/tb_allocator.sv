// tb_allocator: random router states against a reference allocation model
// written in the testbench (round-robin ejection, lowest-index-first static
// arbitration, greedy deflection to the lowest free port, late injection).
// Network flits appear only on inputs whose link exists, as in a real mesh.
// Besides the exact comparison it checks the invariants: every network flit
// gets exactly one port, no port is used twice, absent ports are never used.
module tb_allocator;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] valid;
  port_e port [NPORTS];
  logic [NNET-1:0] avail;
  logic [NPORTS-1:0][NPORTS-1:0] gnt;
  logic [2:0] n_deflected;
  logic eject_conflict, injected, inject_productive, inject_stalled, unserved;
  int checks = 0, failures = 0;
  int n_defl = 0, n_ejc = 0, n_injd = 0, n_stall = 0;

  allocator dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rr;
    logic [NPORTS-1:0][NPORTS-1:0] exp_g;
    logic [NNET-1:0] used;
    int ndef, win;
    bit ejc;
    int ports_avail [$];
    rr = 0;
    valid = '0; avail = '1;
    for (int i = 0; i < NPORTS; i++) port[i] = P_EAST;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      avail = NNET'($urandom);
      if (t % 5 == 0) avail = '1;
      ports_avail.delete();
      for (int o = 0; o < NNET; o++) if (avail[o]) ports_avail.push_back(o + 1);
      valid = '0;
      for (int i = 1; i < NPORTS; i++) begin
        valid[i] = avail[i-1] && ($urandom_range(0, 9) < 7);
        if ($urandom_range(0, 3) == 0) port[i] = P_LOCAL;
        else port[i] = port_e'(ports_avail[$urandom_range(0, ports_avail.size()-1)]);
      end
      valid[0] = ($urandom_range(0, 1) == 1) && ports_avail.size() > 0;
      port[0] = ports_avail.size() > 0 ? port_e'(ports_avail[$urandom_range(0, ports_avail.size()-1)]) : P_EAST;
      #1;
      // ---- reference ----
      exp_g = '0; used = '0; ndef = 0;
      win = -1;
      for (int k = 0; k < NNET; k++) begin
        int i;
        i = (rr + k) % NNET + 1;
        if (win < 0 && valid[i] && port[i] == P_LOCAL) win = i;
      end
      ejc = 0;
      for (int i = 1; i < NPORTS; i++) if (valid[i] && port[i] == P_LOCAL && i != win) ejc = 1;
      if (win > 0) begin exp_g[win][0] = 1'b1; rr = win % NNET; end
      for (int i = 1; i < NPORTS; i++)
        if (valid[i] && port[i] != P_LOCAL && !used[int'(port[i]) - 1]) begin
          exp_g[i][int'(port[i])] = 1'b1;
          used[int'(port[i]) - 1] = 1'b1;
        end
      for (int i = 1; i < NPORTS; i++)
        if (valid[i] && exp_g[i] == '0) begin
          ndef++;
          for (int o = 0; o < NNET; o++)
            if (exp_g[i] == '0 && avail[o] && !used[o]) begin
              exp_g[i][o+1] = 1'b1;
              used[o] = 1'b1;
            end
        end
      if (valid[0]) begin
        if (!used[int'(port[0]) - 1]) exp_g[0][int'(port[0])] = 1'b1;
        else
          for (int o = 0; o < NNET; o++)
            if (exp_g[0] == '0 && avail[o] && !used[o]) exp_g[0][o+1] = 1'b1;
      end
      // ---- compare ----
      check(gnt == exp_g, $sformatf("t=%0d grant matrix", t));
      check(int'(n_deflected) == ndef, "deflection count");
      check(eject_conflict == ejc, "eject conflict");
      check(injected == (exp_g[0] != '0), "injected");
      check(inject_productive == (valid[0] && exp_g[0][int'(port[0])]), "inject productive");
      check(inject_stalled == (valid[0] && exp_g[0] == '0), "inject stalled");
      check(!unserved, "unserved");
      for (int i = 1; i < NPORTS; i++)
        check(!valid[i] || $onehot(gnt[i]), "each network flit served once");
      for (int o = 0; o < NPORTS; o++) begin
        int c;
        c = 0;
        for (int i = 0; i < NPORTS; i++) c += int'(gnt[i][o]);
        check(c <= 1, "port used once");
        if (o > 0 && !avail[o-1]) check(c == 0, "absent port unused");
      end
      n_defl += ndef; n_ejc += int'(ejc);
      n_injd += int'(injected && !inject_productive); n_stall += int'(inject_stalled);
    end
    check(n_defl > 0 && n_ejc > 0 && n_injd > 0 && n_stall > 0, "all mechanisms exercised");
    $display("deflections %0d, refused ejections %0d, deflected injections %0d, stalls %0d",
             n_defl, n_ejc, n_injd, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
