// tb_polar_encoder: end-to-end test of the polar encoder at its default size
// (N = 16, P = 4), one or more complete code words at a time.
//
// Stimulus: random message vectors u, offered as N/P words with random
// gaps inside a code word (pipeline stalls), bursts of back-to-back code
// words, and idle periods after which the encoder flushes its delay
// elements. Reference: the code word x = u * G_N, G_N = B_N F^{(x)n},
// computed straight from the generator matrix (G_N[i][j] = 1 iff the bits of
// j are a subset of the bits of rev(i)); output word t must carry
// x[rev(t*P/2+k)] and x[rev(t*P/2+k)+1] on lanes 2k and 2k+1. Also checked:
// out_idx/out_last, NC consecutive output words per code word inside a
// burst (throughput of one word per cycle), and the latency of NC cycles from the last input word to the
// last output word when the code word is followed by another one.
// Each mechanism (stall, flush, back-to-back hand-over) must occur.
module tb_polar_encoder;
  localparam int N   = 16;
  localparam int P   = 4;
  localparam int NC  = N / P;
  localparam int NST = $clog2(N);
  localparam int CW  = (NC > 1) ? $clog2(NC) : 1;
  localparam int NCODE = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic [P-1:0] in_data = '0;
  logic out_valid, out_last, flushing;
  logic [P-1:0] out_data;
  logic [CW-1:0] out_idx;

  polar_encoder dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_data, .out_idx, .out_last, .flushing
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_flush = 0, n_b2b = 0, n_words_out = 0;
  longint cyc = 0;

  bit u_mem [NCODE][N];
  bit x_mem [NCODE][N];
  int in_code = 0, in_word = 0;       // driver position
  int out_code = 0, out_word = 0;     // checker position
  longint last_in_cyc [NCODE];
  longint first_out_cyc = 0;
  bit     followed [NCODE];           // next code word started right after

  function automatic int rev(input int v);
    int r = 0;
    for (int b = 0; b < NST; b++) if ((v & (1 << b)) != 0) r |= 1 << (NST - 1 - b);
    return r;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    for (int c = 0; c < NCODE; c++) begin
      for (int i = 0; i < N; i++) u_mem[c][i] = 1'($urandom);
      if (c == 0) for (int i = 0; i < N; i++) u_mem[c][i] = 1'b1;
      if (c == 1) for (int i = 0; i < N; i++) u_mem[c][i] = 1'(i == N - 1);
      for (int j = 0; j < N; j++) begin
        automatic bit acc = 1'b0;
        for (int i = 0; i < N; i++)
          if ((j & ~rev(i)) == 0) acc ^= u_mem[c][i];
        x_mem[c][j] = acc;
      end
    end
  end

  // cycle counter and output checker
  logic [P-1:0] exp_w;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && flushing) n_flush++;
    if (rst_n && out_valid) begin
      n_words_out++;
      if (out_code < NCODE) begin
        for (int k = 0; k < P / 2; k++) begin
          exp_w[2*k]   = x_mem[out_code][rev(out_word * P / 2 + k)];
          exp_w[2*k+1] = x_mem[out_code][rev(out_word * P / 2 + k) + 1];
        end
        check(out_data == exp_w,
              $sformatf("code %0d word %0d: got %h exp %h", out_code, out_word, out_data, exp_w));
        check(int'(out_idx) == out_word, $sformatf("out_idx %0d exp %0d", out_idx, out_word));
        check(out_last == (out_word == NC - 1), "out_last");
        if (out_word == 0) first_out_cyc = cyc;
        if (out_word == NC - 1 && followed[out_code]) begin
          check(cyc - last_in_cyc[out_code] == longint'(NC),
                $sformatf("latency %0d exp %0d", cyc - last_in_cyc[out_code], NC));
          check(cyc - first_out_cyc == longint'(NC - 1),
                $sformatf("code word %0d output took %0d cycles", out_code, cyc - first_out_cyc + 1));
        end
      end else check(1'b0, "output beyond the last code word");
      if (out_word == NC - 1) begin
        out_word = 0;
        out_code++;
      end else out_word++;
    end
  end

  // driver
  initial begin
    automatic int mode;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    while (in_code < NCODE) begin
      mode = (in_code / 5) % 3;       // 0: streaming, 1: with stalls, 2: isolated
      if (in_word == 0 && mode == 2 && in_code > 0) begin
        in_valid = 1'b0;
        repeat (NC + 2 + ($urandom % 3)) @(posedge clk);
        #1;
      end
      if (in_word != 0 && mode == 1 && ($urandom % 3) == 0) begin
        in_valid = 1'b0;
        n_stall++;
        repeat (1 + $urandom % 2) @(posedge clk);
        #1;
      end
      in_valid = 1'b1;
      for (int i = 0; i < P; i++) in_data[i] = u_mem[in_code][in_word * P + i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (in_word == NC - 1) begin
        last_in_cyc[in_code] = cyc;
        in_word = 0;
        in_code++;
        if (in_code < NCODE && mode == 0 && (in_code % 5) != 0) begin
          followed[in_code - 1] = 1'b1;
          n_b2b++;
        end
      end else in_word++;
      #1;
    end
    in_valid = 1'b0;
    in_data  = '0;
    repeat (3 * NC + 5) @(posedge clk);
    check(out_code == NCODE, $sformatf("%0d code words out, exp %0d", out_code, NCODE));
    check(n_stall > 0, "no stall happened");
    check(n_flush > 0, "no flush happened");
    check(n_b2b > 0, "no back-to-back hand-over happened");
    $display("mechanisms: stalls=%0d flush_cycles=%0d back_to_back=%0d words_out=%0d",
             n_stall, n_flush, n_b2b, n_words_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (NCODE * NC * 12 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
