// tb_injection_queue: random push/pop traffic against a queue model in the
// testbench; checks head, count, full, credit per pop, FIFO order, the
// one-cycle visibility of a pushed flit, and filling to the 8-slot default.
module tb_injection_queue;
  localparam int W = 73, D = 8;
  logic clk = 0, rst_n = 0;
  logic push, pop, head_valid, full, credit;
  logic [W-1:0] push_flit, head;
  logic [$clog2(D):0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, credits = 0, fulls = 0;

  injection_queue #(.FLIT_W(W), .DEPTH(D)) dut (.*);

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
    push = 0; pop = 0; push_flit = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // check state
      check(count == ($clog2(D)+1)'(model.size()), $sformatf("count %0d vs %0d", count, model.size()));
      check(head_valid == (model.size() != 0), "head_valid");
      check(full == (model.size() == D), "full");
      if (model.size() != 0) check(head == model[0], "head order");
      if (full) fulls++;
      // new stimulus: phases that fill and drain
      push = (t % 400 < 200) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      pop  = (t % 400 < 200) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      if (full) push = 0;
      push_flit = {$urandom, $urandom, $urandom};
      #1;
      check(credit == (pop && model.size() != 0), "credit");
      @(posedge clk);
      #1;
      if (pop && model.size() != 0) begin void'(model.pop_front()); credits++; end
      if (push) model.push_back(push_flit);
    end
    check(fulls > 0, "queue reached full");
    $display("full seen %0d cycles, %0d credits", fulls, credits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
