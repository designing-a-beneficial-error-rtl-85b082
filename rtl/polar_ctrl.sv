// polar_ctrl: control of the partially parallel polar encoder.
//
// The encoder folds the log2(N) stages of the N-bit polar transform onto
// P/2 functional units per stage, each reused every NC = N/P cycles. The
// controller keeps the word counter cnt (position of the word now entering
// the encoder within its codeword, 0..NC-1) from which every delay stage
// derives its folding phase, and decides when the pipeline advances.
//
// Handshake (a design choice, not from the source): in_valid/in_ready,
// one P-bit word per accepted cycle, NC consecutive words per codeword in
// natural order. A gap inside a codeword stalls the whole pipeline
// (adv = 0). When no codeword follows, the results of the last one are still
// inside the delay elements; the controller then runs one "flush block" of
// NC cycles with in_ready low, which pushes them out. Codewords offered back
// to back are taken one word per cycle with no bubbles.
//
// out_fire marks a cycle in which the word leaving the last stage belongs to
// an accepted codeword: it is the accepted-word flag delayed by LAT pipeline
// advances, LAT = NC - 1 being the total latency of the delay stages.
// flushing is high during flush-block cycles (for observation).
module polar_ctrl #(
  parameter int NC  = 4,   // words per codeword, N/P
  parameter int CW  = 2,   // width of cnt
  parameter int LAT = 3    // pipeline latency in advances
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          adv,
  output logic [CW-1:0] cnt,
  output logic          out_fire,
  output logic          flushing
);
  logic          flush_q;   // current block is a flush block
  logic          fire;
  localparam int VW = (LAT > 0) ? LAT : 1;
  logic [VW-1:0] vld_q;     // vld_q[i]: word accepted i+1 advances ago
  logic          pending;
  logic          at_start;

  always_comb begin
    at_start = (cnt == '0);
    pending  = (LAT > 0) && (|vld_q);
    in_ready = at_start || !flush_q;
    fire     = in_valid && in_ready;
    if (at_start)     adv = in_valid || pending;
    else if (flush_q) adv = 1'b1;
    else              adv = in_valid;
    out_fire = (LAT == 0) ? fire : vld_q[VW-1];
    flushing = adv && !fire && (at_start || flush_q);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      flush_q <= 1'b0;
      vld_q   <= '0;
    end else if (adv) begin
      cnt   <= (NC > 1 && cnt != CW'(NC - 1)) ? cnt + 1'b1 : '0;
      vld_q <= VW'({vld_q, fire});
      if (at_start) flush_q <= !in_valid;
    end
  end

  // a flush block never accepts input; a word is only taken on an advance
  a_no_input_in_flush: assert property (@(posedge clk) disable iff (!rst_n)
    !(flush_q && !at_start && in_ready));
  a_fire_advances: assert property (@(posedge clk) disable iff (!rst_n)
    fire |-> adv);
endmodule
