// tb_line_decoder -- exhaustive test of the 3:5 line decoder: addresses
// 0..4 raise exactly their own select line, 5..7 raise none.
module tb_line_decoder;
  logic [2:0] in;
  logic [4:0] out;
  int checks = 0, failures = 0;

  line_decoder dut (.in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] exp_sel;
    for (int a = 0; a < 8; a++) begin
      in = 3'(a);
      #1;
      exp_sel = (a < 5) ? 5'(1 << a) : 5'b0;
      checks++;
      if (out !== exp_sel) begin
        failures++;
        $display("FAIL in=%0d out=%b expected=%b", a, out, exp_sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
