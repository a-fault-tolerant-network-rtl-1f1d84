// data_check: equality check of two data copies, the core of self-checking relaying.
//
// AEQB is 1 when the two words a and b are equal and 0 otherwise. The compare is
// built as a two-stage cascade shaped for 6-input look-up tables: stage one splits
// the words into groups of three bit pairs, so each group's match is a function of
// six inputs (one LUT6 each); stage two ANDs the group matches, at most six of them
// per LUT6 for the 16-bit default. The result is captured on the rising clock edge,
// so aeqb shows the comparison of the a/b present at that edge, one cycle later.
//
// Interface: clk, rst_n (active-low synchronous reset, clears aeqb), a, b, aeqb.
// Timing: one clock cycle of latency, a new comparison every cycle.
// The 16-bit width, the two-stage LUT6 cascade and the clocked result follow the
// published design; the grouping by three bit pairs and the reset are this
// design's choice.
module data_check #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             aeqb
);

  localparam int unsigned PAIRS_PER_LUT = 3;  // 3 bit pairs = 6 LUT inputs
  localparam int unsigned GROUPS = (WIDTH + PAIRS_PER_LUT - 1) / PAIRS_PER_LUT;

  logic [GROUPS-1:0] group_eq;  // stage one: per-group match

  always_comb begin
    for (int g = 0; g < GROUPS; g++) begin
      group_eq[g] = 1'b1;
      for (int k = 0; k < PAIRS_PER_LUT; k++) begin
        if (g * PAIRS_PER_LUT + k < WIDTH)
          group_eq[g] &= ~(a[g*PAIRS_PER_LUT+k] ^ b[g*PAIRS_PER_LUT+k]);
      end
    end
  end

  // stage two: AND of all group matches, registered
  always_ff @(posedge clk) begin
    if (!rst_n) aeqb <= 1'b0;
    else        aeqb <= &group_eq;
  end

endmodule
