// tb_trng_top: end-to-end test of the generator, buffer and FTDI writer.
//
// The top runs with a 32-byte buffer for three complete buffers, writing into
// a model of the FTDI chip. Independent references:
//   * the raw bit presented after edge t must equal the parity of the ring
//     levels sampled here at edge t - 2 (sampling flop plus two XOR steps);
//   * a model of the buffer phase expects filling to hold for exactly 256
//     accepted bits and to return after 32 bytes have been written;
//   * every byte the chip model stores must be the packing (first bit in the
//     LSB) of the raw bits accepted during the matching fill.
// Mechanisms counted, each of which must occur: XOR pipeline checks, buffer
// full (switch to sending), flush and refill, chip busy holding a byte back,
// raw bits dropped while sending.
module tb_trng_top;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int DEPTH = 32;
  localparam int ROUNDS = 3;
  localparam int LAT = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] ftdi_data;
  logic ftdi_wr, ftdi_txe_n, rnd_bit, rnd_valid, filling;
  int checks = 0, failures = 0, cycles = 0;

  trng_top #(.DEPTH_BYTES(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .ftdi_data(ftdi_data), .ftdi_wr(ftdi_wr),
    .ftdi_txe_n(ftdi_txe_n), .rnd_bit(rnd_bit), .rnd_valid(rnd_valid),
    .filling(filling));

  ftdi_fifo_model #(.MAX_BYTES(DEPTH * ROUNDS + 8)) chip (
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

  // ring parity seen at each edge
  logic par_hist [8];
  int   edge_no = 0;
  always @(posedge clk) begin
    par_hist[edge_no % 8] <= ^dut.u_trng.ro_raw;
    edge_no <= edge_no + 1;
  end

  // phase model and expected bytes
  bit         m_fill = 1'b1;
  int         nbits = 0, bytes_expected = 0;
  logic [7:0] exp_bytes [DEPTH * ROUNDS + 8];
  logic [7:0] acc;
  int n_taken = 0;   // bytes the writer took from the buffer in this round
  int n_xor = 0, n_full = 0, n_refill = 0, n_busy_hold = 0, n_dropped = 0;

  always @(posedge clk) if (rst_n) begin
    chk(filling == m_fill, $sformatf("filling %0b, model %0b", filling, m_fill));
    if (rnd_valid && edge_no >= LAT) begin
      chk(rnd_bit == par_hist[(edge_no - LAT) % 8], "raw bit is the ring parity");
      n_xor++;
    end
    if (dut.buf_valid && !dut.buf_ready && ftdi_txe_n) n_busy_hold++;
    if (m_fill && rnd_valid) begin
      acc[nbits % 8] = rnd_bit;
      nbits++;
      if (nbits % 8 == 0) begin
        exp_bytes[bytes_expected] = acc;
        bytes_expected++;
      end
      if (nbits == 8 * DEPTH) begin
        m_fill = 1'b0;
        n_full++;
      end
    end else if (!m_fill) begin
      if (rnd_valid) n_dropped++;
      // the buffer is flushed once its last byte has been taken by the writer
      if (dut.buf_valid && dut.buf_ready) n_taken++;
      if (n_taken == DEPTH) begin
        n_taken = 0;
        m_fill = 1'b1;
        nbits = 0;
        n_refill++;
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (chip.n_rx >= DEPTH * ROUNDS);
    repeat (50) @(posedge clk);
    chk(chip.n_rx == DEPTH * ROUNDS, $sformatf("byte count %0d", chip.n_rx));
    for (int i = 0; i < DEPTH * ROUNDS; i++)
      chk(chip.rx[i] == exp_bytes[i], $sformatf("byte %0d: %h expected %h", i, chip.rx[i], exp_bytes[i]));
    chk(chip.violations == 0, "FTDI protocol");
    $display("xor checks %0d, buffer full %0d, refills %0d, busy holds %0d, dropped bits %0d",
             n_xor, n_full, n_refill, n_busy_hold, n_dropped);
    chk(n_xor > 0, "XOR pipeline exercised");
    chk(n_full >= ROUNDS, "buffer full");
    chk(n_refill >= ROUNDS - 1, "flush and refill");
    chk(n_busy_hold > 0, "chip busy held a byte back");
    chk(n_dropped > 0, "bits dropped while sending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
