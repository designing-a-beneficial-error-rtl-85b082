// tb_polar_kernel_fu: exhaustive test of the 2x2 polar kernel unit.
// All four input pairs (a, b) are applied; y0 must equal the parity a+b
// mod 2 and y1 must equal b, i.e. (a, b) * [[1,0],[1,1]].
module tb_polar_kernel_fu;
  logic a, b, y0, y1;
  int checks = 0, failures = 0;

  polar_kernel_fu dut (.a, .b, .y0, .y1);

  initial begin
    for (int v = 0; v < 4; v++) begin
      a = v[1];
      b = v[0];
      #1;
      checks++;
      // row vector (a, b) times F = [[1,0],[1,1]]: column 0 = a*1 + b*1, column 1 = b
      if (y0 != ((v == 1 || v == 2) ? 1'b1 : 1'b0) || y1 != v[0]) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> %0b%0b", a, b, y0, y1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
