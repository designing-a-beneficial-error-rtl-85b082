// polar_kernel_fu: the functional unit of the encoder, the 2x2 polar kernel
// F = [[1,0],[1,1]] applied to one pair of bits.
//
// For an input pair (a, b), where a has the lower bit position, the unit
// returns (a xor b, b). It is purely combinational; every stage of the
// encoder holds P/2 of these units, one per bit pair processed per cycle,
// so the whole encoder has (P/2)*log2(N) of them.
//
// Ports: a, b in; y0 = a ^ b, y1 = b out. No clock, zero latency. The
// second output is a plain copy of b by the definition of F; it is kept as
// a port so that every stage is built from uniform units.
module polar_kernel_fu (
  input  logic a,
  input  logic b,
  output logic y0,
  output logic y1
);
  always_comb begin
    y0 = a ^ b;
    y1 = b;
  end
endmodule
