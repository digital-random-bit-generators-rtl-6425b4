// combined_trng: the RO-based combined true random bit generator.
//
// N free-running ring oscillators are each sampled by a D flip-flop on the
// system clock (100 MHz in the document) and the N sampled streams are folded
// into one bit by a pipelined tree of registered XOR steps. The jitter of each
// ring makes its sampled stream partly random; XOR-combining many independent
// streams removes bias and the deterministic part of each one. The document
// finds that 15 or more rings are needed for the output to pass the NIST
// SP 800-22 suite on every FPGA family tried; 10 rings fail everywhere.
//
// Timing: with S = xor_num_stages(N, FANIN) XOR steps, the rnd_bit presented
// after clock edge t is the XOR of the ring levels sampled at edge t - S, so
// a ring level reaches the output through 1 + S flip-flops. One bit is
// produced per clock. rnd_valid is high from the (1 + S)-th edge after reset
// is released and then stays high.
//
// The rings are behavioural models (ro_model). Ring i gets a fixed mismatch of
// SKEW_STEP_PS * ((7 * i) mod 11) picoseconds so that no two rings share a
// period; this spread is this design's assumption, as are FANIN and the
// synchronous reset.
module combined_trng
  import trng_pkg::*;
#(
  parameter int unsigned N            = 15,
  parameter int unsigned FANIN        = 4,
  parameter ro_kind_t    RO_KIND      = RO_INV_LATCH,
  parameter int unsigned STAGE_PS     = 450,
  parameter int unsigned SKEW_STEP_PS = 13,
  parameter int unsigned JITTER_PS    = 20
) (
  input  logic clk,
  input  logic rst_n,       // synchronous, active low
  output logic rnd_bit,
  output logic rnd_valid
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [N-1:0] ro_raw;     // ring outputs, asynchronous to clk
  logic [N-1:0] smp;
  logic         smp_valid;

  for (genvar i = 0; i < N; i++) begin : g_ro
    ro_model #(
      .KIND     (RO_KIND),
      .STAGE_PS (STAGE_PS),
      .SKEW_PS  (SKEW_STEP_PS * ((7 * i) % 11)),
      .JITTER_PS(JITTER_PS)
    ) u_ro (
      .ro_out(ro_raw[i])
    );
  end

  ro_sampler #(.N(N)) u_smp (
    .clk  (clk),
    .rst_n(rst_n),
    .ro_in(ro_raw),
    .smp  (smp)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) smp_valid <= 1'b0;
    else        smp_valid <= 1'b1;
  end

  xor_combiner #(.N(N), .FANIN(FANIN)) u_xor (
    .clk      (clk),
    .rst_n    (rst_n),
    .d        (smp),
    .in_valid (smp_valid),
    .q        (rnd_bit),
    .out_valid(rnd_valid)
  );

endmodule
