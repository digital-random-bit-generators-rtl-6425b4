// xor_combiner: pipelined XOR tree folding N sampled streams into one bit.
//
// The streams pass through STAGES registered XOR steps (xor_stage), each
// reducing groups of FANIN streams to one, until a single stream remains:
// with N = 15 and FANIN = 4 the levels are 15 -> 4 -> 1, two steps. The output
// bit is therefore the XOR of all N inputs taken STAGES clocks earlier, and a
// new bit leaves every clock. in_valid travels alongside the data through a
// shift register of the same length, so out_valid marks bits whose whole
// history lies after reset. Combining in several registered steps follows the
// document; the grouping and the valid flag are this design's choice.
module xor_combiner
  import trng_pkg::*;
#(
  parameter int unsigned N     = 15,
  parameter int unsigned FANIN = 4,
  localparam int unsigned STAGES = xor_num_stages(N, FANIN)
) (
  input  logic         clk,
  input  logic         rst_n,     // synchronous, active low
  input  logic [N-1:0] d,
  input  logic         in_valid,
  output logic         q,
  output logic         out_valid
);
  timeunit 1ns;
  timeprecision 1ps;

  // lvl[s] holds level s of the tree in its low xor_width(N, FANIN, s) bits.
  logic [N-1:0] lvl [STAGES+1];
  logic [STAGES-1:0] vpipe;

  assign lvl[0] = d;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned WI = xor_width(N, FANIN, s);
    localparam int unsigned WO = xor_width(N, FANIN, s + 1);
    logic [WO-1:0] qs;
    xor_stage #(.N_IN(WI), .FANIN(FANIN)) u_stage (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (lvl[s][WI-1:0]),
      .q    (qs)
    );
    if (WO < N) begin : g_pad
      assign lvl[s+1] = {{(N - WO){1'b0}}, qs};
    end else begin : g_full
      assign lvl[s+1] = qs;
    end
  end

  if (STAGES == 1) begin : g_v1
    always_ff @(posedge clk) begin
      if (!rst_n) vpipe <= '0;
      else        vpipe <= in_valid;
    end
  end else begin : g_vn
    always_ff @(posedge clk) begin
      if (!rst_n) vpipe <= '0;
      else        vpipe <= {vpipe[STAGES-2:0], in_valid};
    end
  end

  assign q         = lvl[STAGES][0];
  assign out_valid = vpipe[STAGES-1];

endmodule
