// multiplier -- Efficient OMS LUT multiplier of a 4-bit input by a fixed
// coefficient (top level).
//
// Instead of a table of all sixteen products, only five words are stored:
// the coefficient S times the representatives 1, 5, 9, 13 and 15 of the five
// groups of 4-bit inputs that are cyclic rotations of one another. For an
// input Y the encoder picks the group's word, the control circuit works out
// how many places Y is rotated right from the representative, and the word
// read from memory is shifted right by that many places in a two-stage
// barrel shifter. Input zero raises the reset line, and the NOR reset cell
// forces the result to zero.
//
//   out = (S * P[addr(Y)]) >> shift(Y),   out = 0 for Y = 0
//
// This is exactly S*Y for Y in {0, 1, 5, 9, 13, 15}, the stored values. For
// the other ten inputs it is the scheme's result, not the arithmetic product
// S*Y (for Y = 8 it gives S/2, not 8*S). The grouping, shift counts and
// block structure are the document's, kept unchanged.
//
// Ports: `in` is Y, in[3] its most significant bit; `out` is M+4 bits wide.
// The path is purely combinational, one new product every cycle of whatever
// clock drives it, with no latency. Block names and widths follow the
// document's schematic; M = 4 and S = 12 are the sizes of its simulation.
module multiplier
  import oms_pkg::*;
#(
  parameter int unsigned  M     = 4,       // coefficient word length
  parameter logic [M-1:0] COEFF = M'(12),  // fixed coefficient S
  localparam int unsigned W     = M + N_IN
)(
  input  in_t          in,    // multiplicand Y
  output logic [W-1:0] out    // result
);

  addr_t        addr;
  shift_t       shift;
  logic         reset;
  logic [W-1:0] word;
  logic [W-1:0] word_rst;

  address_encoder ae (
    .in  (in),
    .out (addr)
  );

  control cont (
    .in    (in),
    .out   (shift),
    .reset (reset)
  );

  memory_module #(
    .M     (M),
    .COEFF (COEFF)
  ) mm (
    .in  (addr),
    .out (word)
  );

  nor_cell #(
    .W (W)
  ) nc (
    .in    (word),
    .reset (reset),
    .out   (word_rst)
  );

  log_shifter #(
    .W (W)
  ) ls (
    .in  (word_rst),
    .sel (shift),
    .out (out)
  );

endmodule
