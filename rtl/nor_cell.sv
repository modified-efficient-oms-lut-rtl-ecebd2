// nor_cell -- reset cell of the Efficient OMS LUT multiplier.
//
// One NOR gate per bit of the memory word: out[i] = NOR(~in[i], reset). With
// the active-high reset low each bit passes unchanged; with it high (input
// 0000) the output is all zeros, the product by zero. The NOR-per-bit form and
// the active-high reset follow the document; feeding the gates the inverted
// word so that they pass it through is this design's reading. Combinational.
module nor_cell #(
  parameter int unsigned W = 8   // word width, M + 4
)(
  input  logic [W-1:0] in,     // word read from memory
  input  logic         reset,  // 1: force product to zero
  output logic [W-1:0] out
);

  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      out[i] = ~(~in[i] | reset);
    end
  end

endmodule
