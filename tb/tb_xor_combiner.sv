// tb_xor_combiner: checks the pipelined XOR tree at the ring counts the
// document evaluates.
//
// Instances and their expected depth, worked out by hand:
//   N=15, FANIN=4: 15 -> 4 -> 1           2 steps
//   N=30, FANIN=6: 30 -> 5 -> 1           2 steps
//   N=20, FANIN=4: 20 -> 5 -> 2 -> 1      3 steps
//   N=10, FANIN=2: 10 -> 5 -> 3 -> 2 -> 1 4 steps
// Random inputs are applied every clock; each output must equal the parity of
// the inputs that many clocks earlier, and out_valid must rise exactly that
// many clocks after in_valid.
module tb_xor_combiner;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NI = 4;
  localparam int NS [NI] = '{15, 30, 20, 10};
  localparam int FS [NI] = '{4, 6, 4, 2};
  localparam int LS [NI] = '{2, 2, 3, 4};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [29:0] d = '0;
  logic [NI-1:0] q, ov;
  int checks = 0, failures = 0, cycles = 0;

  for (genvar k = 0; k < NI; k++) begin : g_dut
    xor_combiner #(.N(NS[k]), .FANIN(FS[k])) u (
      .clk(clk), .rst_n(rst_n), .d(d[NS[k]-1:0]), .in_valid(in_valid),
      .q(q[k]), .out_valid(ov[k]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // parity history: par[k][t] is the parity of instance k's input at edge t
  logic par [NI][8];
  int   vcyc [NI];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int t;
    for (int k = 0; k < NI; k++) vcyc[k] = -1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (t == 5) in_valid = 1'b1;
      d = 30'($urandom);
      for (int k = 0; k < NI; k++) begin
        int ones;
        ones = 0;
        for (int b = 0; b < NS[k]; b++) if (d[b]) ones++;
        par[k][t % 8] = (ones % 2) == 1;
      end
      @(posedge clk);
      #1;
      for (int k = 0; k < NI; k++) begin
        if (ov[k] && vcyc[k] < 0) vcyc[k] = t;
        // the value that left the tree at this edge entered LS[k]-1 edges ago
        if (t >= LS[k] - 1)
          chk(q[k] == par[k][(t - LS[k] + 1) % 8],
              $sformatf("instance %0d output at step %0d", k, t));
      end
    end
    for (int k = 0; k < NI; k++)
      chk(vcyc[k] == 5 + LS[k] - 1, $sformatf("instance %0d valid latency %0d", k, vcyc[k] - 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
