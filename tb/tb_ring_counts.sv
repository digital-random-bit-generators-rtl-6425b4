// tb_ring_counts: the generator at the ring counts 10, 15, 20 and 30, with
// inverter + latch rings, and at 15 rings built from three inverters (the
// construction used where the logic cell has no latch).
//
// Each generator runs for NBITS clocks. For every one the testbench checks,
// clock by clock, that the bit presented after edge t is the parity of its
// rings sampled at edge t - S. S is the depth of its XOR tree, worked out
// here by hand for fan-in 4 (10 -> 3 -> 1, 15 -> 4 -> 1, 20 -> 5 -> 2 -> 1,
// 30 -> 8 -> 2 -> 1); LAT = S + 1 also counts the sampling flop. It then
// prints the NIST SP 800-22 monobit and runs statistics of the sequence. For 15 rings or more the
// statistics must stay within p >= 0.0001; for 10 rings they are only
// printed. The ring model's jitter is an assumption, so these figures show
// the behaviour of the model, not of any particular FPGA.
module tb_ring_counts;
  timeunit 1ns;
  timeprecision 1ps;
  import trng_pkg::*;

  localparam int NG = 5;
  localparam int NS  [NG] = '{10, 15, 20, 30, 15};
  localparam int LAT [NG] = '{3, 3, 4, 4, 3};
  localparam int NBITS = 32768;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NG-1:0] rb, rv;
  logic par [NG][8];
  int   ones [NG], runs [NG], nb [NG];
  logic prevb [NG];
  int checks = 0, failures = 0, cycles = 0, edge_no = 0;

  combined_trng #(.N(10)) g0 (.clk(clk), .rst_n(rst_n), .rnd_bit(rb[0]), .rnd_valid(rv[0]));
  combined_trng #(.N(15)) g1 (.clk(clk), .rst_n(rst_n), .rnd_bit(rb[1]), .rnd_valid(rv[1]));
  combined_trng #(.N(20)) g2 (.clk(clk), .rst_n(rst_n), .rnd_bit(rb[2]), .rnd_valid(rv[2]));
  combined_trng #(.N(30)) g3 (.clk(clk), .rst_n(rst_n), .rnd_bit(rb[3]), .rnd_valid(rv[3]));
  combined_trng #(.N(15), .RO_KIND(RO_INV3)) g4 (.clk(clk), .rst_n(rst_n), .rnd_bit(rb[4]), .rnd_valid(rv[4]));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  always @(posedge clk) begin
    par[0][edge_no % 8] <= ^g0.ro_raw;
    par[1][edge_no % 8] <= ^g1.ro_raw;
    par[2][edge_no % 8] <= ^g2.ro_raw;
    par[3][edge_no % 8] <= ^g3.ro_raw;
    par[4][edge_no % 8] <= ^g4.ro_raw;
    edge_no <= edge_no + 1;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int rel;
    for (int k = 0; k < NG; k++) begin ones[k] = 0; runs[k] = 0; nb[k] = 0; end
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    rel = edge_no;
    for (int i = 0; i < NBITS + 8; i++) begin
      @(posedge clk);
      #1;
      for (int k = 0; k < NG; k++) begin
        if (edge_no - 1 - rel >= LAT[k] - 1)
          chk(rv[k], $sformatf("group %0d valid", k));
        if (rv[k] && nb[k] < NBITS) begin
          chk(rb[k] == par[k][(edge_no - LAT[k]) % 8], $sformatf("group %0d parity", k));
          if (nb[k] > 0 && rb[k] != prevb[k]) runs[k]++;
          if (nb[k] == 0) runs[k] = 1;
          prevb[k] = rb[k];
          ones[k] += int'(rb[k]);
          nb[k]++;
        end
      end
    end
    for (int k = 0; k < NG; k++) begin
      real n, z1, pi_v, z2;
      n = real'(NBITS);
      z1 = real'(2 * ones[k] - NBITS) / $sqrt(n);
      if (z1 < 0.0) z1 = -z1;
      pi_v = real'(ones[k]) / n;
      z2 = real'(runs[k]) - 2.0 * n * pi_v * (1.0 - pi_v);
      if (z2 < 0.0) z2 = -z2;
      z2 = z2 / (2.0 * $sqrt(2.0 * n) * pi_v * (1.0 - pi_v));
      $display("N=%0d %s: ones %0d of %0d (monobit z %0.3f), runs %0d (runs z %0.3f)",
               NS[k], (k == 4) ? "three-inverter rings" : "inverter+latch rings",
               ones[k], NBITS, z1, runs[k], z2);
      chk(nb[k] == NBITS, $sformatf("group %0d bit count", k));
      if (NS[k] >= 15) begin
        chk(z1 <= 3.8906, $sformatf("N=%0d monobit", NS[k]));
        chk(z2 <= 3.8906, $sformatf("N=%0d runs", NS[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
