// tb_address_encoder -- exhaustive test of the 4:3 input encoder.
// For every non-zero input the expected address is the index of the stored
// representative that the input is a cyclic right rotation of; input 0000
// must give address 000.
module tb_address_encoder;
  import oms_ref_pkg::*;

  logic [3:0] in;
  logic [2:0] out;
  int checks = 0, failures = 0;

  address_encoder dut (.in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g, k;
    for (int y = 0; y < 16; y++) begin
      in = 4'(y);
      #1;
      if (y == 0) g = 0; else classify(y, g, k);
      checks++;
      if (out !== 3'(g)) begin
        failures++;
        $display("FAIL in=%b out=%b expected=%b", in, out, 3'(g));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
