// tb_polar_delay_stage: tests a stage with delay elements on a random word
// stream, including cycles without an advance (the stage must hold).
//
// Two instances: the default one (P = 4, pair distance 4: block of G = 2
// words) and one with P = 4, pair distance 8 (G = 4) and a phase offset of 1
// word, as it sits behind another delay stage. For each, the test keeps the
// half-words it has fed in (first half F on lanes 0,2,.., second half S on
// lanes 1,3,..), assigns them to the half-word positions of the block as
// the previous stage delivers them, and expects at block phase p the
// kernel result of half-word pair (t, t+G): t = p - G/2 from the current
// block for p >= G/2, t = p + G/2 from the previous block for p < G/2.
// This fixes the latency of G/2 words as well as the values.
module tb_polar_delay_stage;
  localparam int P = 4, H = P / 2;
  logic clk = 1'b0, rst_n = 1'b0, adv = 1'b0;
  logic [2:0] cnt = '0;
  logic [P-1:0] in_a = '0, in_b = '0, out_a, out_b;
  int checks = 0, failures = 0;

  polar_delay_stage dut_a (
    .clk, .rst_n, .adv, .cnt(cnt[1:0]), .in_word(in_a), .out_word(out_a));
  polar_delay_stage #(.P(P), .D_PAIR(8), .CW(3), .PHASE_OFS(1)) dut_b (
    .clk, .rst_n, .adv, .cnt, .in_word(in_b), .out_word(out_b));

  always #5 clk = ~clk;

  // half-word store: [instance][block parity][half-word index]
  logic [H-1:0] hw [2][2][8];
  int blk [2];
  bit primed [2];            // previous block fully received

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // expected output and bookkeeping for one instance; call before the edge
  task automatic step(input int inst, input int g, input int ph,
                      input logic [P-1:0] in_w, input logic [P-1:0] out_w);
    logic [H-1:0] f, s, lo, up;
    logic [P-1:0] e;
    int b, t;
    bit have;
    for (int k = 0; k < H; k++) begin
      f[k] = in_w[2*k];
      s[k] = in_w[2*k+1];
    end
    b = blk[inst] & 1;
    // store what arrives
    if (ph < g / 2) begin
      hw[inst][b][ph]         = f;
      hw[inst][b][ph + g / 2] = s;
    end else begin
      hw[inst][b][g + ph - g / 2] = f;
      hw[inst][b][g + ph]         = s;
    end
    if (ph >= g / 2) begin
      t = ph - g / 2;
      lo = hw[inst][b][t];
      up = hw[inst][b][t + g];
      have = 1'b1;
    end else begin
      t = ph + g / 2;
      lo = hw[inst][b ^ 1][t];
      up = hw[inst][b ^ 1][t + g];
      have = primed[inst];
    end
    for (int k = 0; k < H; k++) begin
      e[2*k]   = lo[k] ^ up[k];
      e[2*k+1] = up[k];
    end
    if (have)
      check(out_w == e, $sformatf("inst %0d block %0d phase %0d: got %h exp %h",
                                  inst, blk[inst], ph, out_w, e));
    if (ph == g - 1) begin
      blk[inst]++;
      primed[inst] = 1'b1;
    end
  endtask

  initial begin
    int ph_a, ph_b;
    automatic bit b_started = 1'b0;
    blk = '{0, 0};
    primed = '{1'b0, 1'b0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // instance b is checked from its first phase-0 word (cnt = 1) on
    for (int cyc = 0; cyc < 2000; cyc++) begin
      adv  = ($urandom % 5) != 0;
      in_a = P'($urandom);
      in_b = P'($urandom);
      #3;
      if (adv) begin
        ph_a = int'(cnt) % 2;
        ph_b = (int'(cnt) + 7) % 4;
        step(0, 2, ph_a, in_a, out_a);
        if (ph_b == 0) b_started = 1'b1;
        if (b_started) step(1, 4, ph_b, in_b, out_b);
      end
      @(posedge clk);
      if (adv) cnt <= cnt + 1'b1;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
