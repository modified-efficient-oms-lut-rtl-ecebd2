// control -- control circuit of the Efficient OMS LUT multiplier.
//
// From the 4-bit input y0y1y2y3 (in[3] = y0) it derives the two control bits
// of the right barrel shifter, out = number of right shifts (0..3) that turn
// the stored word into the result, and an active-high `reset` that is 1 only
// for input 0000, whose product is zero. Shift counts follow the document's
// truth table: an input that is its group's stored value needs no shift, each
// further cyclic right rotation of the input adds one. Combinational.
module control
  import oms_pkg::*;
(
  input  in_t    in,     // input multiplicand Y
  output shift_t out,    // shift count: out[1] = S1 (2), out[0] = S0 (1)
  output logic   reset   // 1 when Y = 0
);

  always_comb begin
    unique case (in)
      4'b1000, 4'b1010, 4'b1100, 4'b1110: out = 2'd1;
      4'b0100, 4'b0110, 4'b0111:          out = 2'd2;
      4'b0010, 4'b0011, 4'b1011:          out = 2'd3;
      default:                            out = 2'd0;  // stored values and 0000
    endcase
  end

  assign reset = (in == '0);

endmodule
