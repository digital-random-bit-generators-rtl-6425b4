// xor_stage: one registered combining step of the XOR tree.
//
// The N_IN input streams are split into consecutive groups of FANIN streams
// (the last group may be smaller); each group is reduced by XOR and the result
// is stored in a flip-flop, giving N_OUT = ceil(N_IN / FANIN) streams one clock
// later. Output q[g] is the XOR of d[g*FANIN] .. d[g*FANIN+FANIN-1]. The XOR
// followed by a flip-flop is the structure shown for the generator; the
// document leaves the fan-in of a step to the synthesis tool, so FANIN is a
// parameter here (default 4, the LUT width of most of the evaluated parts).
module xor_stage #(
  parameter int unsigned N_IN  = 15,
  parameter int unsigned FANIN = 4,
  localparam int unsigned N_OUT = (N_IN + FANIN - 1) / FANIN
) (
  input  logic             clk,
  input  logic             rst_n,  // synchronous, active low
  input  logic [N_IN-1:0]  d,
  output logic [N_OUT-1:0] q
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [N_OUT-1:0] x;

  always_comb begin
    x = '0;
    for (int unsigned i = 0; i < N_IN; i++) x[i / FANIN] ^= d[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= x;
  end

endmodule
