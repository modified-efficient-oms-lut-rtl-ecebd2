// tb_memory_module -- reads every address of the product memory, at the
// default size (4-bit coefficient 12) and at an 8-bit coefficient of 201,
// and compares with the coefficient times 1, 5, 9, 13, 15; addresses 5..7
// must read zero.
module tb_memory_module;
  localparam int REPS [5] = '{1, 5, 9, 13, 15};

  logic [2:0]  in;
  logic [7:0]  out_a;
  logic [11:0] out_b;
  int checks = 0, failures = 0;

  memory_module dut_a (.in(in), .out(out_a));
  memory_module #(.M(8), .COEFF(8'd201)) dut_b (.in(in), .out(out_b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb;
    for (int a = 0; a < 8; a++) begin
      in = 3'(a);
      #1;
      ea = (a < 5) ? 12  * REPS[a] : 0;
      eb = (a < 5) ? 201 * REPS[a] : 0;
      checks++;
      if (int'(out_a) !== ea) begin
        failures++;
        $display("FAIL default addr=%0d out=%0d expected=%0d", a, out_a, ea);
      end
      checks++;
      if (int'(out_b) !== eb) begin
        failures++;
        $display("FAIL M=8 addr=%0d out=%0d expected=%0d", a, out_b, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
