// tb_polar_ctrl: tests the encoder controller (NC = 4 words per code word,
// latency 3) under a random in_valid pattern.
//
// The test keeps its own account of the block kind (data block or flush
// block), the word position and the words accepted, and checks every cycle:
//   * position 0: input is taken when offered; the pipeline advances when a
//     word is offered or accepted words are still in flight, else it idles;
//   * inside a data block: the pipeline advances exactly when a word is
//     offered (a gap stalls it) and in_ready stays high;
//   * inside a flush block: in_ready is low and the pipeline advances;
//   * cnt equals the number of advances modulo NC;
//   * out_fire at an advance is set exactly when the word taken LAT advances
//     earlier was accepted.
// Stalls, flush blocks, idle cycles and back-to-back blocks are counted and
// must each occur.
module tb_polar_ctrl;
  localparam int NC = 4, CW = 2, LAT = 3;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic in_ready, adv, out_fire, flushing;
  logic [CW-1:0] cnt;
  int checks = 0, failures = 0;
  int n_stall = 0, n_flush = 0, n_idle = 0, n_b2b = 0;

  polar_ctrl #(.NC(NC), .CW(CW), .LAT(LAT)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .adv, .cnt, .out_fire, .flushing);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    automatic int pos = 0;              // model word position
    automatic bit flush_blk = 1'b0;     // model: current block is a flush block
    bit hist [$];             // accepted flag per advance, newest last
    bit pend;
    bit exp_fire;
    int dens;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      dens = (cyc / 200) % 3;   // phases of dense, sparse and very sparse input
      in_valid = (dens == 0) ? (($urandom % 8) != 0)
               : (dens == 1) ? (($urandom % 2) != 0) : (($urandom % 12) == 0);
      #3;
      pend = 1'b0;
      for (int i = 0; i < LAT && i < hist.size(); i++)
        if (hist[hist.size() - 1 - i]) pend = 1'b1;
      check(int'(cnt) == pos, $sformatf("cnt %0d exp %0d", cnt, pos));
      if (pos == 0) begin
        check(in_ready, "not ready at block start");
        check(adv == (in_valid || pend), "advance at block start");
        if (!in_valid && !pend) n_idle++;
        if (in_valid && pend) n_b2b++;
      end else if (flush_blk) begin
        check(!in_ready && adv, "flush block must advance without input");
        n_flush++;
      end else begin
        check(in_ready, "not ready inside a data block");
        check(adv == in_valid, "data block advance must follow in_valid");
        if (!in_valid) n_stall++;
      end
      if (adv) begin
        exp_fire = (hist.size() >= LAT) ? hist[hist.size() - LAT] : 1'b0;
        check(out_fire == exp_fire, $sformatf("out_fire %0b exp %0b", out_fire, exp_fire));
        check(flushing == (!(in_valid && in_ready) && (pos == 0 || flush_blk)), "flushing flag");
        hist.push_back(in_valid && in_ready);
        if (hist.size() > 16) void'(hist.pop_front());
        if (pos == 0) flush_blk = !in_valid;
        pos = (pos + 1) % NC;
      end
      @(posedge clk);
      #1;
    end
    check(n_stall > 0 && n_flush > 0 && n_idle > 0 && n_b2b > 0, "a mechanism never occurred");
    $display("stalls=%0d flush_cycles=%0d idle=%0d back_to_back=%0d", n_stall, n_flush, n_idle, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
