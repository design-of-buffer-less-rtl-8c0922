// tb_eject_unit: random request patterns against a reference round-robin
// arbiter kept in the testbench; also checks the conflict flag and that every
// persistently requesting input is served within N grants.
module tb_eject_unit;
  localparam int N = 6;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic any_conflict;
  int checks = 0, failures = 0;
  int ref_ptr;

  eject_unit #(.N(N)) dut (.clk, .rst_n, .req, .gnt, .any_conflict);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_g;
    int win, waited;
    req = '0;
    ref_ptr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      req = N'($urandom);
      if (t % 7 == 0) req = '0;
      #1;
      exp_g = '0; win = -1;
      for (int k = 0; k < N; k++)
        if (win < 0 && req[(ref_ptr + k) % N]) win = (ref_ptr + k) % N;
      if (win >= 0) exp_g[win] = 1'b1;
      check(gnt == exp_g, $sformatf("t=%0d req=%b gnt=%b exp=%b", t, req, gnt, exp_g));
      check(any_conflict == ($countones(req) > 1), "conflict flag");
      if (win >= 0) ref_ptr = (win + 1) % N;
    end
    // fairness: all inputs request all the time, each is served once per N cycles
    for (int t = 0; t < 4*N; t++) begin
      @(negedge clk);
      req = '1;
      #1;
      check($onehot(gnt), "one grant under full load");
      check(gnt[ref_ptr], $sformatf("rotation at %0d", t));
      ref_ptr = (ref_ptr + 1) % N;
    end
    waited = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
