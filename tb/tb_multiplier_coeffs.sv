// tb_multiplier_coeffs -- the multiplier over every 4-bit coefficient 0..15
// and over 8-bit coefficients 1, 133 and 255, each with all 16 inputs,
// against the reference model; stored inputs are also checked against the
// true product.
module tb_multiplier_coeffs;
  import oms_ref_pkg::*;

  localparam int NC4 = 16;
  localparam int C8 [3] = '{1, 133, 255};

  logic [3:0] in;
  logic [7:0]  out4 [NC4];
  logic [11:0] out8 [3];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NC4; c++) begin : g_c4
    multiplier #(.M(4), .COEFF(4'(c))) dut (.in(in), .out(out4[c]));
  end
  for (genvar c = 0; c < 3; c++) begin : g_c8
    multiplier #(.M(8), .COEFF(8'(C8[c]))) dut (.in(in), .out(out8[c]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int y = 0; y < 16; y++) begin
      in = 4'(y);
      #1;
      for (int c = 0; c < NC4; c++) begin
        e = expected(c, y, 8);
        checks++;
        if (longint'(out4[c]) !== e) begin
          failures++;
          $display("FAIL M=4 S=%0d Y=%0d out=%0d expected=%0d", c, y, out4[c], e);
        end
        if (y inside {0, 1, 5, 9, 13, 15}) begin
          checks++;
          if (int'(out4[c]) !== c * y) failures++;
        end
      end
      for (int c = 0; c < 3; c++) begin
        e = expected(C8[c], y, 12);
        checks++;
        if (longint'(out8[c]) !== e) begin
          failures++;
          $display("FAIL M=8 S=%0d Y=%0d out=%0d expected=%0d", C8[c], y, out8[c], e);
        end
        if (y inside {0, 1, 5, 9, 13, 15}) begin
          checks++;
          if (int'(out8[c]) !== C8[c] * y) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
