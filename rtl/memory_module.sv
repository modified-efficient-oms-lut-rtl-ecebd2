// memory_module -- five-word product memory of the Efficient OMS LUT multiplier.
//
// Holds the precomputed products COEFF*1, COEFF*5, COEFF*9, COEFF*13 and
// COEFF*15 of the fixed M-bit coefficient, as words P0..P4 of M+4 bits. The
// 3-bit address goes through the 3:5 line decoder; the five select lines
// each gate one word onto the output (a wired-OR read), so an address that
// selects no word reads zero. The words are fixed at elaboration from COEFF,
// as the coefficient is constant; the read is combinational.
// The five stored odd multiples, the decoder and the M+4-bit word come from
// the document; M = 4 and COEFF = 12 are the sizes of its simulation result
// (5 times 12 gives 60 on an 8-bit output).
module memory_module
  import oms_pkg::*;
#(
  parameter int unsigned     M     = 4,      // coefficient word length
  parameter logic [M-1:0]    COEFF = M'(12), // fixed coefficient S
  localparam int unsigned    W     = M + N_IN
)(
  input  addr_t         in,   // word address d0d1d2
  output logic [W-1:0]  out   // stored product
);

  wsel_t word_sel;

  line_decoder dec (
    .in  (in),
    .out (word_sel)
  );

  // The memory array, filled with COEFF times each stored odd multiple.
  logic [W-1:0] mem [N_WORDS];

  always_comb begin
    for (int unsigned i = 0; i < N_WORDS; i++) begin
      mem[i] = W'(COEFF) * W'(odd_multiple(i));
    end
  end

  always_comb begin
    out = '0;
    for (int unsigned i = 0; i < N_WORDS; i++) begin
      out |= {W{word_sel[i]}} & mem[i];
    end
  end

endmodule
