// oms_ref_pkg -- reference model for the Efficient OMS LUT multiplier tests.
//
// Works out the expected group, shift and result of an input independently of
// the RTL tables: it searches the five representatives 1, 5, 9, 13, 15 and
// the rotation counts 0..3 for the first cyclic right rotation (in the bit
// string y0y1y2y3, y0 most significant) that equals the input.
package oms_ref_pkg;

  localparam int REPS [5] = '{1, 5, 9, 13, 15};

  // Cyclic right rotation of the bit string y0y1y2y3 by k places: y3 moves
  // to y0, i.e. the least significant bit becomes the most significant.
  function automatic int rotr4(input int v, input int k);
    int r;
    r = v & 15;
    for (int i = 0; i < k; i++) r = ((r & 1) << 3) | (r >> 1);
    return r;
  endfunction

  // Group index (0..4) and rotation count of a non-zero input.
  function automatic void classify(input int y, output int grp, output int k);
    grp = -1;
    k   = -1;
    for (int g = 0; g < 5 && grp < 0; g++)
      for (int s = 0; s < 4 && grp < 0; s++)
        if (rotr4(REPS[g], s) == y) begin
          grp = g;
          k   = s;
        end
  endfunction

  // Expected multiplier output for coefficient c, input y, output width w.
  function automatic longint expected(input longint c, input int y, input int w);
    int g, k;
    longint p;
    if (y == 0) return 0;
    classify(y, g, k);
    p = (c * REPS[g]) % (longint'(1) << w);
    return p / (longint'(1) << k);
  endfunction

endpackage
