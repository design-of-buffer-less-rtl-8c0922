// tb_switch_encoder: random partial permutations of inputs onto outputs; every
// granted flit must appear on its output, other outputs must be empty, and the
// dequeue bits must match the granted inputs.
module tb_switch_encoder;
  import noc_pkg::*;
  localparam int W = 73;
  logic [NPORTS-1:0][NPORTS-1:0] gnt;
  logic [W-1:0] fin [NPORTS];
  logic [W-1:0] fout [NPORTS];
  logic [NPORTS-1:0] deq;
  int checks = 0, failures = 0;

  switch_encoder #(.FLIT_W(W)) dut (.gnt, .flit_in(fin), .deq, .flit_out(fout));

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
    int perm [NPORTS];
    int src [NPORTS];
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < NPORTS; i++) perm[i] = i;
      for (int i = NPORTS-1; i > 0; i--) begin
        int j, tmp;
        j = int'($urandom_range(0, i));
        tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      gnt = '0;
      for (int o = 0; o < NPORTS; o++) src[o] = -1;
      for (int i = 0; i < NPORTS; i++) begin
        fin[i] = {$urandom, $urandom, $urandom};
        if ($urandom_range(0, 3) != 0) begin
          gnt[i][perm[i]] = 1'b1;
          src[perm[i]] = i;
        end
      end
      #1;
      for (int o = 0; o < NPORTS; o++)
        check(fout[o] == (src[o] >= 0 ? fin[src[o]] : '0), $sformatf("t=%0d out %0d", t, o));
      for (int i = 0; i < NPORTS; i++)
        check(deq[i] == (gnt[i] != '0), "deq");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
