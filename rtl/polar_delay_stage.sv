// polar_delay_stage: one encoder stage whose bit pairs span different P-bit
// words (pair distance D_PAIR >= P). It holds the stage's delay elements,
// the multiplexers in front of its functional units and P/2 functional units.
//
// How it works. Group the P bits of a word into two halves of P/2 bits: the
// previous stage delivers, each cycle, a "first" half F (its lower outputs,
// lanes 0,2,4,..) and a "second" half S (its upper outputs, lanes 1,3,5,..).
// With G = 2*D_PAIR/P (the pair distance counted in half-words), the stage
// works on blocks of G input words. In the first G/2 words of a block the
// stage receives all lower half-words of its pairs; in the last G/2 words it
// receives the upper ones. It issues the P/2 kernel operations of one
// operation slot per cycle, in ascending order of their lower bit position
// (the folding set of each unit), with a latency of G/2 = D_PAIR/P cycles:
//   * second half of a block (phase >= G/2): lower operand = F received G/2
//     cycles earlier (register chain Y), upper operand = F arriving now;
//   * first half of a block (phase < G/2): finishes the previous block,
//     lower operand = S of the previous block's first half (chain X, G cycles
//     old), upper operand = S of its second half (chain Y, G/2 cycles old).
// Chain Y shifts every cycle, loading F in the first half and S in the
// second; chain X shifts in the first half only, loading S. Both are G/2
// half-words deep, so the stage stores exactly D_PAIR bits, the minimum the
// lifetime analysis gives (4 + 8 = 12 bits for a 16-bit code at P = 4).
// The count of 12 and the multiplexers in front of the units follow the
// source; this particular allocation into two chains, and its
// generalisation to any pair distance, are this design's own.
//
// Ports: rst_n (synchronous, active low) clears both chains; adv advances
// the pipeline one word (the stage holds when it is low);
// cnt is the encoder's word counter, from which the stage derives its phase
// within a block as (cnt - PHASE_OFS) mod G, PHASE_OFS being the latency of
// the stages in front of it. in_word/out_word use the pair-per-unit lane
// order (lane 2k lower bit, lane 2k+1 upper bit of unit k). out_word is
// combinational from in_word and the registers.
module polar_delay_stage #(
  parameter int P         = 4,
  parameter int D_PAIR    = 4,
  parameter int CW        = 2,
  parameter int PHASE_OFS = 0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          adv,
  input  logic [CW-1:0] cnt,
  input  logic [P-1:0]  in_word,
  output logic [P-1:0]  out_word
);
  localparam int H   = P / 2;          // bits per half-word
  localparam int G   = 2 * D_PAIR / P; // block length in words, >= 2
  localparam int GH  = G / 2;          // depth of each register chain
  localparam int GW  = $clog2(G);

  initial begin
    assert (D_PAIR >= P && (D_PAIR & (D_PAIR - 1)) == 0 && (1 << CW) >= G)
      else $error("polar_delay_stage: bad D_PAIR / CW");
  end

  logic [GW-1:0] phase;
  logic          second;   // in the second half of a block
  logic [H-1:0]  f_in, s_in;
  logic [H-1:0]  x_q [GH];
  logic [H-1:0]  y_q [GH];
  logic [H-1:0]  lo, up;

  always_comb begin
    phase  = GW'(cnt - CW'(PHASE_OFS));
    second = phase[GW-1];
    for (int k = 0; k < H; k++) begin
      f_in[k] = in_word[2*k];
      s_in[k] = in_word[2*k+1];
    end
    // multiplexers in front of the functional units
    lo = second ? y_q[GH-1] : x_q[GH-1];
    up = second ? f_in      : y_q[GH-1];
  end

  // delay elements
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < GH; i++) begin
        x_q[i] <= '0;
        y_q[i] <= '0;
      end
    end else if (adv) begin
      y_q[0] <= second ? s_in : f_in;
      for (int i = 1; i < GH; i++) y_q[i] <= y_q[i-1];
      if (!second) begin
        x_q[0] <= s_in;
        for (int i = 1; i < GH; i++) x_q[i] <= x_q[i-1];
      end
    end
  end

  for (genvar k = 0; k < H; k++) begin : g_fu
    polar_kernel_fu u_fu (
      .a (lo[k]),
      .b (up[k]),
      .y0(out_word[2*k]),
      .y1(out_word[2*k+1])
    );
  end
endmodule
