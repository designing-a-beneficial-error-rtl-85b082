// polar_encoder: partially parallel, pipelined encoder for polar codes of
// length N, taking P message bits per clock cycle.
//
// The encoder computes y = u * F^{(x)n}, n = log2(N), F = [[1,0],[1,1]],
// the butterfly network of n stages in which stage s combines the bits at
// distance 2**(s-1). With G_N = B_N F^{(x)n} (B_N the bit-reversal
// permutation) the code word is x with x[rev(j)] = y[j], so y is the code
// word in bit-reversed order. The fully parallel network with N/2 units per
// stage is folded onto P/2 functional units per stage; each unit is reused
// every NC = N/P cycles.
//   * stages with pair distance below P (stages 1..log2 P) take their pairs
//     from within one word and need only wiring (polar_direct_stage);
//   * stages with pair distance d >= P hold d delay elements each and put
//     multiplexers in front of their units (polar_delay_stage). Together
//     they store N - P bits and add NC - 1 cycles of latency.
//
// Input: NC words per code word, word t carrying u[t*P + i] on bit i.
// Output: word t (t = out_idx) carries, for k = 0..P/2-1,
//   out_data[2k]   = y[t*P/2 + k]       = x[rev(t*P/2 + k)]
//   out_data[2k+1] = y[t*P/2 + k + N/2] = x[rev(t*P/2 + k) + 1]
// i.e. pairs of consecutive code bits, the pairs in bit-reversed order.
//
// Handshake: in_valid/in_ready (see polar_ctrl); out_valid marks an output
// word, out_last the last word of a code word. Throughput P bits per cycle
// for back-to-back code words; latency NC cycles from the last input word of
// a code word to its last output word (NC - 1 through the delay stages plus
// the output register). Parameters follow the source's worked example,
// N = 16 and P = 4; both must be powers of two with 2 <= P <= N, and P = N
// gives the fully parallel encoder. The stage structure and the unit and
// register counts follow the source; the handshake, flush, synchronous
// reset and output register are this design's own.
module polar_encoder #(
  parameter int N = 16,
  parameter int P = 4
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  output logic                               in_ready,
  input  logic [P-1:0]                       in_data,
  output logic                               out_valid,
  output logic [P-1:0]                       out_data,
  output logic [polar_pkg::cnt_width(N/P)-1:0] out_idx,
  output logic                               out_last,
  output logic                               flushing
);
  import polar_pkg::*;

  localparam int NST = $clog2(N);     // number of stages
  localparam int NC  = N / P;         // words per code word
  localparam int CW  = cnt_width(NC);
  localparam int LAT = NC - 1;        // latency of the delay stages

  initial begin
    assert (P >= 2 && P <= N && (N & (N - 1)) == 0 && (P & (P - 1)) == 0)
      else $error("polar_encoder: N and P must be powers of two, 2 <= P <= N");
  end

  logic          adv, out_fire;
  logic [CW-1:0] cnt;
  logic [P-1:0]  stage_w [NST+1];     // stage_w[s]: output of stage s

  polar_ctrl #(.NC(NC), .CW(CW), .LAT(LAT)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .adv, .cnt, .out_fire, .flushing
  );

  // words not accepted enter as zeros
  assign stage_w[0] = (in_valid && in_ready) ? in_data : '0;

  for (genvar s = 1; s <= NST; s++) begin : g_stage
    localparam int D = 1 << (s - 1);
    if (D < P) begin : g_direct
      polar_direct_stage #(.P(P), .D_PAIR(D)) u_stage (
        .in_word (stage_w[s-1]),
        .out_word(stage_w[s])
      );
    end else begin : g_delay
      polar_delay_stage #(.P(P), .D_PAIR(D), .CW(CW), .PHASE_OFS(D / P - 1)) u_stage (
        .clk, .rst_n, .adv, .cnt,
        .in_word (stage_w[s-1]),
        .out_word(stage_w[s])
      );
    end
  end

  // output register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_idx   <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= adv && out_fire;
      if (adv) begin
        out_data <= stage_w[NST];
        out_idx  <= CW'(cnt - CW'(LAT));
        out_last <= (NC == 1) || (CW'(cnt - CW'(LAT)) == CW'(NC - 1));
      end
    end
  end
endmodule
