// tb_static_output_arbiter: exhaustive-by-random check of the fixed-priority
// port arbiter. Each input requests one random port (or none); the expected
// winner of every port is the lowest-indexed requester.
module tb_static_output_arbiter;
  localparam int N = 6;
  logic [N-1:0][N-1:0] req, gnt;
  logic [N-1:0] taken;
  int checks = 0, failures = 0;

  static_output_arbiter #(.N(N)) dut (.req, .gnt, .taken);

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
    int want [N];
    logic [N-1:0][N-1:0] exp_g;
    for (int t = 0; t < 5000; t++) begin
      req = '0;
      for (int i = 0; i < N; i++) begin
        want[i] = int'($urandom_range(0, N));     // N = no request
        if (want[i] < N) req[i][want[i]] = 1'b1;
      end
      #1;
      exp_g = '0;
      for (int o = 0; o < N; o++)
        for (int i = N-1; i >= 0; i--)
          if (want[i] == o) begin
            for (int k = 0; k < N; k++) exp_g[k][o] = 1'b0;
            exp_g[i][o] = 1'b1;
          end
      check(gnt == exp_g, $sformatf("t=%0d", t));
      for (int o = 0; o < N; o++) begin
        bit any;
        any = 0;
        for (int i = 0; i < N; i++) any |= req[i][o];
        check(taken[o] == any, "taken");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
