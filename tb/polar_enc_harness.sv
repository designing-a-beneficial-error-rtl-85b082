// polar_enc_harness: self-checking harness around one polar_encoder of a
// given size, used by tb_polar_encoder_sizes.
//
// It feeds NCODE random message vectors, with random stalls inside code
// words and idle gaps between some of them, and checks every output word
// against the butterfly reference: y = u * F^{(x)n} computed in place
// (for d = 1, 2, 4, ..: v[i] ^= v[i+d] for every i whose bit d is clear);
// output word t must carry y[t*P/2+k] on lane 2k and y[t*P/2+k+N/2] on
// lane 2k+1. It also checks out_idx and out_last, that all code words come
// out, and that flushes and stalls occurred. done rises when it has finished.
module polar_enc_harness #(
  parameter int N     = 1024,
  parameter int P     = 16,
  parameter int NCODE = 6
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NC = N / P;
  localparam int CW = (NC > 1) ? $clog2(NC) : 1;

  logic in_valid, in_ready, out_valid, out_last, flushing;
  logic [P-1:0] in_data, out_data;
  logic [CW-1:0] out_idx;

  polar_encoder #(.N(N), .P(P)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_data, .out_idx, .out_last, .flushing
  );

  bit u_mem [NCODE][N];
  bit y_mem [NCODE][N];
  int out_code = 0, out_word = 0, n_stall = 0, n_flush = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d P=%0d: %s", N, P, what);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    for (int c = 0; c < NCODE; c++) begin
      for (int i = 0; i < N; i++) begin
        u_mem[c][i] = 1'($urandom);
        y_mem[c][i] = u_mem[c][i];
      end
      for (int d = 1; d < N; d *= 2)
        for (int i = 0; i < N; i++)
          if ((i & d) == 0) y_mem[c][i] ^= y_mem[c][i + d];
    end
  end

  always @(posedge clk) begin
    if (rst_n && flushing) n_flush++;
    if (rst_n && out_valid) begin
      logic [P-1:0] e;
      for (int k = 0; k < P / 2; k++) begin
        e[2*k]   = y_mem[out_code][out_word * P / 2 + k];
        e[2*k+1] = y_mem[out_code][out_word * P / 2 + k + N / 2];
      end
      check(out_data == e, $sformatf("code %0d word %0d", out_code, out_word));
      check(int'(out_idx) == out_word && out_last == (out_word == NC - 1), "out_idx/out_last");
      if (out_word == NC - 1) begin
        out_word = 0;
        out_code++;
      end else out_word++;
    end
  end

  initial begin
    in_valid = 1'b0;
    in_data  = '0;
    @(posedge rst_n);
    @(posedge clk);
    #1;
    for (int c = 0; c < NCODE; c++) begin
      if (c % 3 == 2) begin
        in_valid = 1'b0;
        repeat (NC + 3) @(posedge clk);
        #1;
      end
      for (int w = 0; w < NC; w++) begin
        if (w != 0 && ($urandom % 16) == 0) begin
          in_valid = 1'b0;
          n_stall++;
          @(posedge clk);
          #1;
        end
        in_valid = 1'b1;
        for (int i = 0; i < P; i++) in_data[i] = u_mem[c][w * P + i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
      end
    end
    in_valid = 1'b0;
    repeat (2 * NC + 4) @(posedge clk);
    check(out_code == NCODE, $sformatf("%0d code words out", out_code));
    check(NC == 1 || n_flush > 0, "no flush");
    check(NC < 8 || n_stall > 0, "no stall");
    done = 1'b1;
  end
endmodule
