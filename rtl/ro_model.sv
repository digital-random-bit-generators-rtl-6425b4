// ro_model: behavioural model of one ring oscillator (not synthesizable logic).
//
// A real RO is an inverter whose output is fed back to its input through a
// delay element tau. On Xilinx and Altera parts tau is a transparent latch
// (two elements in the loop); on Lattice ECP3 it is two more inverters, since
// a latch built from a LUT is too slow (three elements). In silicon the loop is
// a combinational cycle that must carry a synthesis "keep" attribute so the
// tools do not remove it. In simulation a combinational loop cannot oscillate,
// so this model replaces it with a timed process: the output toggles after
// every half period, where
//     half period = elements * STAGE_PS + SKEW_PS + jitter,
// and the jitter is drawn afresh each half period from a triangular
// distribution on [-JITTER_PS, +JITTER_PS] (sum of two uniform draws). The
// start phase is random. STAGE_PS is one LUT plus its routing; SKEW_PS models
// the mismatch between otherwise identical rings. All delay values are
// assumptions of this model; the document gives no timing beyond requiring
// the ring to run much faster than the 100 MHz sampling clock.
//
// Interface: a single output, ro_out. There is no enable: the ring runs freely
// from power-up.
module ro_model
  import trng_pkg::*;
#(
  parameter ro_kind_t    KIND      = RO_INV_LATCH,
  parameter int unsigned STAGE_PS  = 450,  // delay of one element incl. routing
  parameter int unsigned SKEW_PS   = 0,    // fixed mismatch of this ring
  parameter int unsigned JITTER_PS = 20    // peak jitter per half period
) (
  output logic ro_out
);
  timeunit 1ps;        // delays below are whole picoseconds
  timeprecision 1ps;

  localparam int unsigned NOMINAL_PS = ro_elem_count(KIND) * STAGE_PS + SKEW_PS;

  // Triangular jitter in picoseconds, centred on zero.
  function automatic int jitter_ps();
    int a, b;
    if (JITTER_PS == 0) return 0;
    a = int'($urandom_range(JITTER_PS, 0));
    b = int'($urandom_range(JITTER_PS, 0));
    return a + b - int'(JITTER_PS);
  endfunction

  int unsigned half_ps;

  initial begin
    ro_out = 1'b0;
    // random start phase within the first half period
    half_ps = $urandom_range(NOMINAL_PS, 1);
    #(half_ps);
    forever begin
      ro_out = ~ro_out;
      half_ps = int'(NOMINAL_PS) + jitter_ps();
      #(half_ps);
    end
  end

  // the jitter may never stop or reverse the ring
  initial assert (JITTER_PS < NOMINAL_PS)
    else $error("JITTER_PS must be smaller than the nominal half period");

endmodule
