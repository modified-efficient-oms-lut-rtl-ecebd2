// address_encoder -- 4:3 input encoder of the Efficient OMS LUT multiplier.
//
// Maps the 4-bit input y0y1y2y3 (in[3] = y0, the most significant bit) to the
// 3-bit address d0d1d2 (out[2] = d0) of the memory word P0..P4 whose cyclic
// right rotation equals the input:
//   P0 (000): 0001 1000 0100 0010     P1 (001): 0101 1010
//   P2 (010): 1001 1100 0110 0011     P3 (011): 1101 1110 0111 1011
//   P4 (100): 1111
// The table is the document's. Input 0000 has no stored word: the reset cell
// zeroes the product then, and this encoder gives address 000, an arbitrary
// choice of this design. Purely combinational, no clock.
module address_encoder
  import oms_pkg::*;
(
  input  in_t   in,   // input multiplicand Y
  output addr_t out   // word address d0d1d2
);

  always_comb begin
    unique case (in)
      4'b0001, 4'b1000, 4'b0100, 4'b0010: out = 3'b000;  // P0
      4'b0101, 4'b1010:                   out = 3'b001;  // P1
      4'b1001, 4'b1100, 4'b0110, 4'b0011: out = 3'b010;  // P2
      4'b1101, 4'b1110, 4'b0111, 4'b1011: out = 3'b011;  // P3
      4'b1111:                            out = 3'b100;  // P4
      default:                            out = 3'b000;  // 0000: reset
    endcase
  end

endmodule
