// tb_nor_cell -- the reset cell passes its word with reset low and gives
// zero with reset high, over all 256 words of the default 8-bit width.
module tb_nor_cell;
  logic [7:0] in, out;
  logic       reset;
  int checks = 0, failures = 0;

  nor_cell dut (.in(in), .reset(reset), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      for (int r = 0; r < 2; r++) begin
        in    = 8'(v);
        reset = r[0];
        #1;
        checks++;
        if (out !== (r ? 8'd0 : 8'(v))) begin
          failures++;
          $display("FAIL in=%h reset=%0d out=%h", in, r, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
