// tb_control -- exhaustive test of the control circuit: shift count equals
// the number of cyclic right rotations from the stored representative, and
// reset is high for input 0000 only.
module tb_control;
  import oms_ref_pkg::*;

  logic [3:0] in;
  logic [1:0] out;
  logic       reset;
  int checks = 0, failures = 0;

  control dut (.in(in), .out(out), .reset(reset));

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
      if (y == 0) k = 0; else classify(y, g, k);
      checks++;
      if (out !== 2'(k)) begin
        failures++;
        $display("FAIL in=%b shift=%0d expected=%0d", in, out, k);
      end
      checks++;
      if (reset !== (y == 0)) begin
        failures++;
        $display("FAIL in=%b reset=%b", in, reset);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
