// tb_polar_direct_stage: tests the delay-free stages.
//
// Three instances with P = 8 and pair distances 1, 2 and 4 are chained; for
// P = N = 8 this is the complete (fully parallel) transform, so lane 2k of
// the last stage must carry y[k] and lane 2k+1 must carry y[k+4], with
// y = u * F^{(x)3} computed from the Kronecker product rule (y[j] is the
// parity of the u[i] whose index bits contain those of j). The first stage
// alone is checked against its definition (lanes 2m, 2m+1 = u[2m]^u[2m+1],
// u[2m+1]), and a default-sized instance (P = 4, first stage) as well.
// Random and exhaustive-by-weight-one input words are used.
module tb_polar_direct_stage;
  logic [7:0] u, w1, w2, w3;
  logic [3:0] u4, v4;
  int checks = 0, failures = 0;

  polar_direct_stage #(.P(8), .D_PAIR(1)) s1 (.in_word(u),  .out_word(w1));
  polar_direct_stage #(.P(8), .D_PAIR(2)) s2 (.in_word(w1), .out_word(w2));
  polar_direct_stage #(.P(8), .D_PAIR(4)) s3 (.in_word(w2), .out_word(w3));
  polar_direct_stage dflt (.in_word(u4), .out_word(v4));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    logic [7:0] y, e1, e3;
    logic [3:0] e4;
    for (int it = 0; it < 300; it++) begin
      u  = (it < 8) ? 8'(1 << it) : 8'($urandom);
      u4 = 4'($urandom);
      #1;
      for (int j = 0; j < 8; j++) begin
        y[j] = 1'b0;
        for (int i = 0; i < 8; i++) if ((i & j) == j) y[j] ^= u[i];
      end
      for (int k = 0; k < 4; k++) begin
        e3[2*k]   = y[k];
        e3[2*k+1] = y[k+4];
        e1[2*k]   = u[2*k] ^ u[2*k+1];
        e1[2*k+1] = u[2*k+1];
      end
      for (int k = 0; k < 2; k++) begin
        e4[2*k]   = u4[2*k] ^ u4[2*k+1];
        e4[2*k+1] = u4[2*k+1];
      end
      check(w1 == e1, $sformatf("stage 1: u=%h got %h exp %h", u, w1, e1));
      check(w3 == e3, $sformatf("3 stages: u=%h got %h exp %h", u, w3, e3));
      check(v4 == e4, $sformatf("default stage: u=%h got %h exp %h", u4, v4, e4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
