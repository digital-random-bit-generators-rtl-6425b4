// tb_ro_sampler: checks the ring sampling flip-flops.
//
// Random 15-bit patterns are applied between clock edges; one clock after
// each edge the outputs must equal the pattern present at that edge. Reset
// must clear every flop.
module tb_ro_sampler;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 15;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] ro_in = '0, smp, exp_q;
  int checks = 0, failures = 0, cycles = 0;

  ro_sampler #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .ro_in(ro_in), .smp(smp));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    ro_in = '1;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (smp !== '0) begin failures++; $display("FAIL: reset leaves %h", smp); end
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ro_in = N'($urandom);
      exp_q = ro_in;
      @(posedge clk);
      #1;
      ro_in = ~exp_q;          // change after the edge: must not be seen
      #1;
      checks++;
      if (smp !== exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL: smp %h expected %h", smp, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
