// line_decoder -- 3:5 line decoder of the Efficient OMS LUT memory.
//
// Turns the 3-bit address d0d1d2 (in[2] = d0) into five one-hot word-select
// lines, out[i] high for word Pi. Addresses 101..111 are never produced by the
// encoder; they select no word (all lines low), which is this design's
// choice. Combinational.
module line_decoder
  import oms_pkg::*;
(
  input  addr_t in,   // word address
  output wsel_t out   // one-hot word select, bit i = word Pi
);

  always_comb begin
    out = '0;
    for (int unsigned i = 0; i < N_WORDS; i++) begin
      out[i] = (in == addr_t'(i));
    end
  end

endmodule
