// tb_deflection_unit: random sets of searching flits and free ports. The
// expected result is a greedy assignment computed in the testbench (searching
// inputs in index order, each taking the lowest free port). Also checks that
// the grants form a matching inside need x free, and that nobody is left
// without a port while enough ports are free.
module tb_deflection_unit;
  localparam int N = 6;
  logic [N-1:0] need, free, free_out, unserved;
  logic [N-1:0][N-1:0] gnt;
  int checks = 0, failures = 0;

  deflection_unit #(.N(N)) dut (.need, .free, .gnt, .free_out, .unserved);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0][N-1:0] exp_g;
    logic [N-1:0] pool, exp_un;
    for (int t = 0; t < 4096; t++) begin
      need = N'(t);
      free = N'(t >> N);
      #1;
      exp_g = '0; pool = free; exp_un = '0;
      for (int i = 0; i < N; i++) begin
        if (need[i]) begin
          int j;
          j = 0;
          while (j < N && !pool[j]) j++;
          if (j < N) begin exp_g[i][j] = 1'b1; pool[j] = 1'b0; end
          else exp_un[i] = 1'b1;
        end
      end
      check(gnt == exp_g, $sformatf("need=%b free=%b", need, free));
      check(free_out == pool, "free_out");
      check(unserved == exp_un, "unserved");
      if ($countones(free) >= $countones(need)) check(unserved == '0, "served when ports suffice");
      for (int i = 0; i < N; i++) begin
        check($countones(gnt[i]) <= 1, "one port per flit");
        check(need[i] || gnt[i] == '0, "grant only to searching flit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
