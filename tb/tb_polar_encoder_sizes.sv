// tb_polar_encoder_sizes: runs the encoder at other code lengths and degrees
// of parallelism: a 32768-bit code (a 4096-byte storage sector) at P = 64,
// a 1024-bit code at P = 16, the smallest parallelism P = 2 (N = 64) and the
// fully parallel case P = N = 8, which has no delay stage at all.
// Each size is checked by polar_enc_harness against the butterfly
// reference.
module tb_polar_encoder_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] done;
  int ck [4], fl [4];
  int checks, failures;

  always #5 clk = ~clk;

  polar_enc_harness #(.N(32768), .P(64), .NCODE(3)) h0 (.clk, .rst_n, .done(done[0]), .checks(ck[0]), .failures(fl[0]));
  polar_enc_harness #(.N(1024),  .P(16), .NCODE(6)) h1 (.clk, .rst_n, .done(done[1]), .checks(ck[1]), .failures(fl[1]));
  polar_enc_harness #(.N(64),    .P(2),  .NCODE(8)) h2 (.clk, .rst_n, .done(done[2]), .checks(ck[2]), .failures(fl[2]));
  polar_enc_harness #(.N(8),     .P(8),  .NCODE(8)) h3 (.clk, .rst_n, .done(done[3]), .checks(ck[3]), .failures(fl[3]));

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (&done);
    checks = ck[0] + ck[1] + ck[2] + ck[3];
    failures = fl[0] + fl[1] + fl[2] + fl[3];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ck[0] + ck[1] + ck[2] + ck[3],
             fl[0] + fl[1] + fl[2] + fl[3] + 1);
    $finish;
  end
endmodule
