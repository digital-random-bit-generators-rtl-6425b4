// tb_xor_stage: checks one registered XOR step at three sizes.
//
// Instances: 15 streams in groups of 4 (4 outputs), 30 in groups of 6
// (5 outputs), 7 in groups of 3 (3 outputs, the last group of one). For random
// inputs the expected output g is the parity of the group's inputs, counted
// here bit by bit, and it must appear one clock after the inputs.
module tb_xor_stage;
  timeunit 1ns;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [14:0] da = '0;
  logic [29:0] db = '0;
  logic [6:0]  dc = '0;
  logic [3:0]  qa;
  logic [4:0]  qb;
  logic [2:0]  qc;
  int checks = 0, failures = 0, cycles = 0;

  xor_stage #(.N_IN(15), .FANIN(4)) ua (.clk(clk), .rst_n(rst_n), .d(da), .q(qa));
  xor_stage #(.N_IN(30), .FANIN(6)) ub (.clk(clk), .rst_n(rst_n), .d(db), .q(qb));
  xor_stage #(.N_IN(7),  .FANIN(3)) uc (.clk(clk), .rst_n(rst_n), .d(dc), .q(qc));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // expected group parities, by counting ones
  function automatic logic [7:0] groups(input logic [29:0] d, input int n, input int f);
    logic [7:0] r;
    r = '0;
    for (int g = 0; g * f < n; g++) begin
      int ones;
      ones = 0;
      for (int j = 0; j < f; j++)
        if (g * f + j < n && d[g * f + j]) ones++;
      r[g] = (ones % 2) == 1;
    end
    return r;
  endfunction

  task automatic chk(input logic [7:0] got, input logic [7:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL: %s got %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    logic [7:0] ea, eb, ec;
    repeat (2) @(posedge clk);
    #1;
    chk({4'b0, qa}, 8'h0, "reset a");
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      da = 15'($urandom);
      db = 30'($urandom);
      dc = 7'($urandom);
      ea = groups({15'b0, da}, 15, 4);
      eb = groups(db, 30, 6);
      ec = groups({23'b0, dc}, 7, 3);
      @(posedge clk);
      #1;
      chk({4'b0, qa}, ea, "15/4");
      chk({3'b0, qb}, eb, "30/6");
      chk({5'b0, qc}, ec, "7/3");
    end
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
