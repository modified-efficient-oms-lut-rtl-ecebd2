// oms_pkg -- shared sizes, types and the stored-word table of the Efficient OMS
// (odd multiple storage) LUT multiplier.
//
// The multiplier takes an unsigned 4-bit input Y. Its fifteen non-zero values
// fall into five groups; inside a group every value is a cyclic right rotation
// of one representative, read as the bit string y0y1y2y3 with y0 the most
// significant bit. The representatives 1, 5, 9, 13 and 15 are the five words
// P0..P4 of the memory, which holds the coefficient times each of them. The
// groups, addresses and shift counts follow the document's truth table; the
// package form, names and types are this design's own.
package oms_pkg;

  // Input word length N. The encoder, decoder and memory are built for 4 bits.
  localparam int unsigned N_IN    = 4;
  // Address d0d1d2 of a stored word.
  localparam int unsigned ADDR_W  = 3;
  // Number of stored words P0..P4.
  localparam int unsigned N_WORDS = 5;
  // Control bits of the two-stage barrel shifter (shift 0..3).
  localparam int unsigned SHIFT_W = 2;

  typedef logic [N_IN-1:0]    in_t;
  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [SHIFT_W-1:0] shift_t;
  typedef logic [N_WORDS-1:0] wsel_t;

  // Representative input value (odd multiple) stored at word `idx`.
  function automatic in_t odd_multiple(input int unsigned idx);
    case (idx)
      0:       return in_t'(1);   // P0 = 0001
      1:       return in_t'(5);   // P1 = 0101
      2:       return in_t'(9);   // P2 = 1001
      3:       return in_t'(13);  // P3 = 1101
      4:       return in_t'(15);  // P4 = 1111
      default: return in_t'(0);
    endcase
  endfunction

endpackage
