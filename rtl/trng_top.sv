// trng_top: complete random bit source, from ring oscillators to USB chip.
//
// Data path: combined_trng (N sampled ring oscillators folded by a pipelined
// XOR tree, one bit per clock) -> bit_buffer (collects 8*DEPTH bits, then
// sends them as DEPTH bytes, flushes and starts again) -> ftdi_tx (writes each
// byte into an external FTDI USB FIFO chip, which carries it to a PC). No
// post-processing is applied anywhere: the PC receives the raw XOR output.
//
// Clock: clk is the 100 MHz system clock. On the boards of the document it
// comes from a PLL doubling a 50 MHz oscillator, or from a 100 MHz quartz;
// that source is outside this design. rst_n is a synchronous active-low
// reset.
//
// Besides the FTDI pins, the raw generator output (rnd_bit, rnd_valid) and the
// buffer phase (filling) are brought out for observation.
//
// Defaults: 15 rings (the smallest count the document found to pass its
// statistical tests on every device), XOR fan-in 4, an 8192-byte buffer. The
// fan-in, the buffer size and the FTDI timing are this design's choices.
module trng_top
  import trng_pkg::*;
#(
  parameter int unsigned N_RO           = 15,
  parameter int unsigned XOR_FANIN      = 4,
  parameter ro_kind_t    RO_KIND        = RO_INV_LATCH,
  parameter int unsigned DEPTH_BYTES    = 8192,
  parameter int unsigned WR_CYCLES      = 5,
  parameter int unsigned RECOVER_CYCLES = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // FTDI FIFO chip
  output logic [7:0] ftdi_data,
  output logic       ftdi_wr,
  input  logic       ftdi_txe_n,
  // observation
  output logic       rnd_bit,
  output logic       rnd_valid,
  output logic       filling
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [7:0] buf_data;
  logic       buf_valid, buf_ready;

  combined_trng #(
    .N      (N_RO),
    .FANIN  (XOR_FANIN),
    .RO_KIND(RO_KIND)
  ) u_trng (
    .clk      (clk),
    .rst_n    (rst_n),
    .rnd_bit  (rnd_bit),
    .rnd_valid(rnd_valid)
  );

  bit_buffer #(.DEPTH(DEPTH_BYTES)) u_buf (
    .clk      (clk),
    .rst_n    (rst_n),
    .bit_in   (rnd_bit),
    .bit_valid(rnd_valid),
    .filling  (filling),
    .out_data (buf_data),
    .out_valid(buf_valid),
    .out_ready(buf_ready)
  );

  ftdi_tx #(
    .WR_CYCLES     (WR_CYCLES),
    .RECOVER_CYCLES(RECOVER_CYCLES)
  ) u_ftdi (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_data   (buf_data),
    .in_valid  (buf_valid),
    .in_ready  (buf_ready),
    .ftdi_data (ftdi_data),
    .ftdi_wr   (ftdi_wr),
    .ftdi_txe_n(ftdi_txe_n)
  );

endmodule
