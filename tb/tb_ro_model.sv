// tb_ro_model: checks the ring oscillator model.
//
// Two rings are run, one of each construction (inverter + latch: two
// elements; three inverters), with different mismatch. Every half period is
// measured and must lie within the nominal value plus or minus the peak
// jitter, the nominal value being worked out here from the element counts.
// The mean half period must be close to nominal, the jitter must actually
// vary the period, and both rings must run much faster than a 100 MHz clock.
module tb_ro_model;
  timeunit 1ns;
  timeprecision 1ps;
  import trng_pkg::*;

  localparam int STAGE = 450;
  localparam int J     = 20;
  localparam int NOM0  = 2 * STAGE + 0;    // inverter + latch, no skew
  localparam int NOM1  = 3 * STAGE + 37;   // three inverters, 37 ps skew

  logic r0, r1, clk = 1'b0;
  int checks = 0, failures = 0;

  ro_model #(.KIND(RO_INV_LATCH), .STAGE_PS(STAGE), .SKEW_PS(0),  .JITTER_PS(J)) u0 (.ro_out(r0));
  ro_model #(.KIND(RO_INV3),      .STAGE_PS(STAGE), .SKEW_PS(37), .JITTER_PS(J)) u1 (.ro_out(r1));

  always #5 clk = ~clk;

  realtime t0 = -1.0, t1 = -1.0;
  int e0 = 0, e1 = 0;   // edges seen; the first interval is the start phase
  real sum0 = 0.0, sum1 = 0.0, mn0 = 1.0e9, mx0 = 0.0;
  int n0 = 0, n1 = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  always @(r0) begin
    e0++;
    if (e0 > 2) begin
      real h;
      h = ($realtime - t0) * 1000.0;
      chk(h >= real'(NOM0 - J) - 1.0 && h <= real'(NOM0 + J) + 1.0,
          $sformatf("ring 0 half period %0.1f ps", h));
      sum0 += h; n0++;
      if (h < mn0) mn0 = h;
      if (h > mx0) mx0 = h;
    end
    t0 = $realtime;
  end

  always @(r1) begin
    e1++;
    if (e1 > 2) begin
      real h;
      h = ($realtime - t1) * 1000.0;
      chk(h >= real'(NOM1 - J) - 1.0 && h <= real'(NOM1 + J) + 1.0,
          $sformatf("ring 1 half period %0.1f ps", h));
      sum1 += h; n1++;
    end
    t1 = $realtime;
  end

  int cycles = 0;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 2000);
    chk(n0 > 2000 * 4, $sformatf("ring 0 edges per 2000 clocks: %0d", n0));
    chk(n1 > 2000 * 4, $sformatf("ring 1 edges per 2000 clocks: %0d", n1));
    chk(n0 > 0 && (sum0 / n0) > NOM0 - 3 && (sum0 / n0) < NOM0 + 3, "ring 0 mean half period");
    chk(n1 > 0 && (sum1 / n1) > NOM1 - 3 && (sum1 / n1) < NOM1 + 3, "ring 1 mean half period");
    chk(mx0 - mn0 > real'(J), "jitter varies the period");
    $display("ring0 %0d edges mean %0.2f ps, ring1 %0d edges mean %0.2f ps", n0, sum0 / n0, n1, sum1 / n1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
