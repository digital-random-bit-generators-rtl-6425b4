// tb_bit_buffer: checks the fill / send / flush cycle of the bit buffer.
//
// A 16-byte buffer is fed random bits with random gaps in bit_valid, and its
// output is drained with a randomly stalling out_ready. The testbench keeps
// its own model of the phase: it expects bits to be accepted until exactly
// 128 have been taken, then 16 bytes to come out (first bit of each byte in
// the LSB), then accepting to start afresh. Checked every clock: filling
// against the model, no byte offered while filling, every byte against the
// model's packing of the accepted bits, a stalled byte held unchanged. Three
// complete buffers are run, and the clocks from the end of a fill to the
// first byte must be two.
module tb_bit_buffer;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int DEPTH = 16;
  localparam int ROUNDS = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_in = 1'b0, bit_valid = 1'b0, out_ready = 1'b0;
  logic filling, out_valid;
  logic [7:0] out_data;
  int checks = 0, failures = 0, cycles = 0;

  bit_buffer #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .bit_in(bit_in), .bit_valid(bit_valid),
    .filling(filling), .out_data(out_data), .out_valid(out_valid),
    .out_ready(out_ready));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // model
  bit          m_fill = 1'b1;
  logic        bits [8*DEPTH];
  int          nbits = 0, nbytes = 0, rounds = 0, stalls = 0;
  int          full_cycle = 0, first_cycle = 0;
  logic        prev_stall = 1'b0;
  logic [7:0]  prev_data;

  always @(posedge clk) if (rst_n) begin
    // values in force just before this edge
    chk(filling == m_fill, $sformatf("filling %0b, model %0b", filling, m_fill));
    if (m_fill) chk(!out_valid, "byte offered while filling");
    if (prev_stall) chk(out_valid && out_data == prev_data, "stalled byte held");
    prev_stall = out_valid && !out_ready;
    prev_data  = out_data;
    if (m_fill && bit_valid) begin
      bits[nbits] = bit_in;
      nbits++;
      if (nbits == 8 * DEPTH) begin
        m_fill = 1'b0;
        full_cycle = cycles;
      end
    end else if (!m_fill && out_valid && out_ready) begin
      logic [7:0] e;
      for (int b = 0; b < 8; b++) e[b] = bits[8 * nbytes + b];
      chk(out_data == e, $sformatf("byte %0d: %h expected %h", nbytes, out_data, e));
      if (nbytes == 0) begin
        first_cycle = cycles;
        chk(first_cycle - full_cycle == 2, $sformatf("fill to first byte %0d clocks", first_cycle - full_cycle));
      end
      nbytes++;
      if (nbytes == DEPTH) begin
        m_fill = 1'b1;
        nbits = 0;
        nbytes = 0;
        rounds++;
      end
    end
    if (out_valid && !out_ready) stalls++;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (rounds < ROUNDS) begin
      @(negedge clk);
      bit_in    = $urandom_range(1, 0) == 1;
      bit_valid = $urandom_range(9, 0) < 7;
      out_ready = $urandom_range(1, 0) == 1;
    end
    chk(stalls > 0, "output stalls exercised");
    $display("rounds %0d, stalls %0d", rounds, stalls);
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
