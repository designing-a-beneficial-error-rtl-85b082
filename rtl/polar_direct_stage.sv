// polar_direct_stage: one encoder stage whose bit pairs lie inside a single
// P-bit word (pair distance D_PAIR < P). Such stages need no delay
// elements: the P/2 functional units are fed by constant wiring.
//
// Operation m of the stage (m = 0..P/2-1) acts on word-relative positions
// i = polar_pkg::low_pos(D_PAIR, m) and i + D_PAIR. The input word comes from
// the previous stage (or from the encoder input when D_PAIR = 1) in that
// stage's lane order, which polar_pkg::lane_of() resolves. Functional unit m
// drives output lanes 2m (i: a xor b) and 2m+1 (i + D_PAIR: b), which is the
// pair-per-unit order every later stage expects.
//
// Parameters: P (bits per word), D_PAIR (pair distance 2**(stage-1)).
// Timing: combinational, zero latency.
module polar_direct_stage #(
  parameter int P      = 4,
  parameter int D_PAIR = 1
) (
  input  logic [P-1:0] in_word,
  output logic [P-1:0] out_word
);
  import polar_pkg::*;

  // Previous stage's pair distance: 0 denotes the natural-order encoder input.
  localparam int DPREV = D_PAIR / 2;

  initial begin
    assert (D_PAIR >= 1 && D_PAIR < P && (D_PAIR & (D_PAIR - 1)) == 0)
      else $error("polar_direct_stage: D_PAIR must be a power of two below P");
  end

  for (genvar m = 0; m < P / 2; m++) begin : g_fu
    localparam int LO = low_pos(D_PAIR, m);
    localparam int LANE_A = lane_of(DPREV, LO);
    localparam int LANE_B = lane_of(DPREV, LO + D_PAIR);
    polar_kernel_fu u_fu (
      .a (in_word[LANE_A]),
      .b (in_word[LANE_B]),
      .y0(out_word[2*m]),
      .y1(out_word[2*m+1])
    );
  end
endmodule
