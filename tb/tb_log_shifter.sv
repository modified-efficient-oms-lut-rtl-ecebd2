// tb_log_shifter -- all 256 words of the default 8-bit width and random
// 12-bit words, each shifted by 0..3; the expected value is the word divided
// by 2^shift.
module tb_log_shifter;
  logic [7:0]  in_a, out_a;
  logic [11:0] in_b, out_b;
  logic [1:0]  sel;
  int checks = 0, failures = 0;

  log_shifter dut_a (.in(in_a), .sel(sel), .out(out_a));
  log_shifter #(.W(12)) dut_b (.in(in_b), .sel(sel), .out(out_b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vb;
    for (int v = 0; v < 256; v++) begin
      for (int s = 0; s < 4; s++) begin
        vb   = int'($urandom_range(4095));
        in_a = 8'(v);
        in_b = 12'(vb);
        sel  = 2'(s);
        #1;
        checks++;
        if (int'(out_a) !== v / (1 << s)) begin
          failures++;
          $display("FAIL W=8 in=%0d sel=%0d out=%0d", v, s, out_a);
        end
        checks++;
        if (int'(out_b) !== vb / (1 << s)) begin
          failures++;
          $display("FAIL W=12 in=%0d sel=%0d out=%0d", vb, s, out_b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
