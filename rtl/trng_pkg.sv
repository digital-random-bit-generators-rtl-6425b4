// trng_pkg: types and constants shared by the combined ring-oscillator TRNG.
//
// The generator samples N free-running ring oscillators (ROs) on the system
// clock and folds the N sampled streams into a single bit with a pipelined
// tree of XOR steps. This package holds:
//   * ro_kind_t      - how the RO loop is built. The inverter + latch form is
//                      the one used on Xilinx and Altera parts; the three-
//                      inverter form replaces the latch on Lattice ECP3.
//   * ro_elem_count  - number of delay elements one edge crosses in the loop.
//   * xor_width /
//     xor_num_stages - widths of the XOR tree levels when every step folds
//                      FANIN streams into one (rounding up at each level).
//   * buf_state_t    - states of the fill / drain buffer controller.
// The two RO constructions follow the document; the stage arithmetic and the
// buffer state encoding are this design's own.
package trng_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [0:0] {
    RO_INV_LATCH = 1'b0,   // inverter + transparent latch as delay element
    RO_INV3      = 1'b1    // inverter + two inverters as delay element
  } ro_kind_t;

  // Delay elements crossed by one edge travelling once round the loop.
  function automatic int ro_elem_count(ro_kind_t kind);
    return (kind == RO_INV3) ? 3 : 2;
  endfunction

  // Width of level s of the XOR tree: level 0 is the N sampled streams,
  // every further level has ceil(previous / FANIN) streams.
  function automatic int xor_width(int n, int fanin, int s);
    int w;
    w = n;
    for (int i = 0; i < s; i++) w = (w + fanin - 1) / fanin;
    return w;
  endfunction

  // Number of registered XOR steps needed to reach a single stream.
  // At least one step is always present, as in the figure of the generator.
  function automatic int xor_num_stages(int n, int fanin);
    int w, s;
    if (fanin < 2) return 1;   // a step must fold at least two streams
    w = n;
    s = 0;
    do begin
      w = (w + fanin - 1) / fanin;
      s++;
    end while (w > 1);
    return s;
  endfunction

  typedef enum logic [1:0] {
    BUF_FILL = 2'd0,       // collecting random bits into memory
    BUF_READ = 2'd1,       // memory read of the next byte issued
    BUF_SEND = 2'd2        // byte offered on the output, waiting for ready
  } buf_state_t;

endpackage
