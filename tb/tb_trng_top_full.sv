// tb_trng_top_full: one complete buffer at the default sizes.
//
// The top runs with all its defaults (15 rings, fan-in 4, 8192-byte buffer)
// until the FTDI chip model has received one full buffer, 65536 bits. The
// received bytes must match the raw generator bits accepted during the fill,
// packed first-bit-in-LSB, and the fill must take exactly 65536 clocks of
// valid bits. On the received sequence the testbench then evaluates, as the
// PC would, the first two tests of the NIST SP 800-22 suite:
//   monobit: z = |#ones - #zeros| / sqrt(n), p = erfc(z / sqrt 2);
//   runs:    with pi = #ones/n, the pre-test |pi - 1/2| < 2/sqrt(n) and
//            z = |V - 2 n pi (1-pi)| / (2 sqrt(2n) pi (1-pi)), V the number
//            of runs, p = erfc(z / sqrt 2).
// A single sequence of an ideal source misses p >= 0.01 one time in a
// hundred, so the checks use p >= 0.0001 (z <= 3.8906); whether p >= 0.01
// (z <= 2.5758) was met is printed.
module tb_trng_top_full;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int DEPTH = 8192;
  localparam int NBITS = 8 * DEPTH;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] ftdi_data;
  logic ftdi_wr, ftdi_txe_n, rnd_bit, rnd_valid, filling;
  int checks = 0, failures = 0, cycles = 0;

  trng_top dut (
    .clk(clk), .rst_n(rst_n), .ftdi_data(ftdi_data), .ftdi_wr(ftdi_wr),
    .ftdi_txe_n(ftdi_txe_n), .rnd_bit(rnd_bit), .rnd_valid(rnd_valid),
    .filling(filling));

  ftdi_fifo_model #(.MAX_BYTES(DEPTH), .LONG_EVERY(64)) chip (
    .wr(ftdi_wr), .data(ftdi_data), .txe_n(ftdi_txe_n));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [7:0] exp_bytes [DEPTH];
  logic [7:0] acc;
  int nbits = 0, fill_start = -1, fill_end = -1;

  always @(posedge clk) if (rst_n && filling && rnd_valid && nbits < NBITS) begin
    if (fill_start < 0) fill_start = cycles;
    acc[nbits % 8] = rnd_bit;
    nbits++;
    if (nbits % 8 == 0) exp_bytes[nbits / 8 - 1] = acc;
    if (nbits == NBITS) fill_end = cycles;
  end

  initial begin
    int ones, runs, prev;
    real n, s_obs, pi_v, v_obs;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (chip.n_rx >= DEPTH);
    repeat (20) @(posedge clk);
    chk(chip.n_rx == DEPTH, $sformatf("bytes received %0d", chip.n_rx));
    chk(fill_end - fill_start == NBITS - 1, $sformatf("fill took %0d clocks", fill_end - fill_start + 1));
    for (int i = 0; i < DEPTH; i++)
      chk(chip.rx[i] == exp_bytes[i], $sformatf("byte %0d: %h expected %h", i, chip.rx[i], exp_bytes[i]));
    chk(chip.violations == 0, "FTDI protocol");
    // statistics on the bits as received
    ones = 0; runs = 1; prev = int'(chip.rx[0][0]);
    for (int i = 0; i < NBITS; i++) begin
      int b;
      b = int'(chip.rx[i / 8][i % 8]);
      ones += b;
      if (i > 0 && b != prev) runs++;
      prev = b;
    end
    n = real'(NBITS);
    s_obs = ((ones > NBITS - ones) ? real'(2 * ones - NBITS) : real'(NBITS - 2 * ones)) / $sqrt(n);
    pi_v = real'(ones) / n;
    v_obs = real'(runs) - 2.0 * n * pi_v * (1.0 - pi_v);
    if (v_obs < 0.0) v_obs = -v_obs;
    v_obs = v_obs / (2.0 * $sqrt(2.0 * n) * pi_v * (1.0 - pi_v));
    $display("ones %0d of %0d, monobit statistic %0.3f, runs %0d, runs statistic %0.3f, drain took %0d clocks",
             ones, NBITS, s_obs, runs, v_obs, cycles - fill_end);
    $display("at significance 0.01: monobit %s, runs %s",
             (s_obs <= 2.5758) ? "pass" : "fail", (v_obs <= 2.5758) ? "pass" : "fail");
    chk(s_obs <= 3.8906, "monobit test");
    chk((pi_v - 0.5 < 2.0 / $sqrt(n)) && (0.5 - pi_v < 2.0 / $sqrt(n)), "runs pre-test");
    chk(v_obs <= 3.8906, "runs test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
