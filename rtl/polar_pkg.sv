// polar_pkg: shared constants and elaboration-time helper functions of the
// partially parallel polar encoder.
//
// Bit positions inside one P-bit input word are counted 0..P-1 in natural
// order. Stage s (1-based) pairs bits whose positions differ by
// d = 2**(s-1). The m-th operation of a stage, counting operations in
// ascending order of their lower bit position, has lower position
// low_pos(s, m); functional unit m of a stage writes the lower (xored) bit of
// its pair to output lane 2m and the upper (passed) bit to lane 2m+1.
// lane_of() inverts that placement so that a stage can find, by constant
// wiring, the lane on which the previous stage left a given bit position.
package polar_pkg;

  // Lower bit position of operation m in a stage of pair distance d.
  function automatic int low_pos(input int d, input int m);
    return (m / d) * 2 * d + (m % d);
  endfunction

  // Output lane of the stage with pair distance dprev (0: the encoder input
  // itself, natural order) that carries word-relative bit position p.
  function automatic int lane_of(input int dprev, input int p);
    int m;
    if (dprev == 0) return p;
    if (((p / dprev) % 2) == 0) begin
      m = (p / (2 * dprev)) * dprev + (p % dprev);
      return 2 * m;
    end
    m = ((p - dprev) / (2 * dprev)) * dprev + ((p - dprev) % dprev);
    return 2 * m + 1;
  endfunction

  // Width of a counter over n states, at least 1.
  function automatic int cnt_width(input int n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
