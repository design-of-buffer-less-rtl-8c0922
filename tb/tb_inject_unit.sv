// tb_inject_unit: all combinations of waiting flit, productive port and free
// ports. Expected: productive port if free, else lowest free port, else stall.
module tb_inject_unit;
  import noc_pkg::*;
  localparam int N = 6;
  logic valid;
  port_e port;
  logic [N-1:0] free, gnt;
  logic injected, productive, stalled;
  int checks = 0, failures = 0;

  inject_unit #(.N(N)) dut (.valid, .port, .free, .gnt, .injected, .productive, .stalled);

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
    logic [N-1:0] exp_g;
    for (int v = 0; v < 2; v++)
      for (int p = 1; p <= N; p++)
        for (int f = 0; f < (1 << N); f++) begin
          valid = v[0]; port = port_e'(p); free = N'(f);
          #1;
          exp_g = '0;
          if (v == 1) begin
            if (free[p-1]) exp_g[p-1] = 1'b1;
            else for (int j = 0; j < N; j++) if (exp_g == '0 && free[j]) exp_g[j] = 1'b1;
          end
          check(gnt == exp_g, $sformatf("v=%0d p=%0d free=%b gnt=%b", v, p, free, gnt));
          check(injected == (exp_g != '0), "injected");
          check(productive == (v == 1 && free[p-1]), "productive");
          check(stalled == (v == 1 && free == '0), "stalled");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
