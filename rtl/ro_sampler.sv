// ro_sampler: one D flip-flop per ring oscillator.
//
// Each RO output is sampled on the rising edge of the 100 MHz system clock,
// as in the first column of flip-flops of the combined generator. The
// sampled value smp[i] is the level of ro_in[i] just before that edge, so it
// appears one cycle after the edge. A synchronous reset clears the flops so
// that a simulation starts from known values; the document shows the flops
// without a reset, and the reset is this design's choice. No metastability
// filter is added: the figure shows one flop per ring, and a metastable
// sample only adds to the randomness the generator relies on.
module ro_sampler #(
  parameter int unsigned N = 15    // number of ring oscillators
) (
  input  logic         clk,
  input  logic         rst_n,      // synchronous, active low
  input  logic [N-1:0] ro_in,      // asynchronous RO outputs
  output logic [N-1:0] smp         // sampled streams
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk) begin
    if (!rst_n) smp <= '0;
    else        smp <= ro_in;
  end

endmodule
