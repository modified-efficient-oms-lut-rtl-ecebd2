// log_shifter -- two-stage logarithmic right barrel shifter.
//
// Shifts the W-bit word right by sel (0..3) with zeros shifted in at the top:
// stage one shifts by one place when sel[0] is set, stage two by two places
// when sel[1] is set. Two stages cover the largest shift of three that the
// encoder's table needs, as the document states; zero fill is this design's
// reading of "right shift". Combinational.
module log_shifter
  import oms_pkg::*;
#(
  parameter int unsigned W = 8   // word width, M + 4
)(
  input  logic [W-1:0] in,
  input  shift_t       sel,    // shift count
  output logic [W-1:0] out
);

  logic [W-1:0] stage1;

  assign stage1 = sel[0] ? (in     >> 1) : in;
  assign out    = sel[1] ? (stage1 >> 2) : stage1;

endmodule
