// tb_multiplier -- end-to-end test of the multiplier at its default size
// (4-bit coefficient 12, 8-bit output).
//
// A clock paces the inputs: one new input per cycle, all 16 values in a
// shuffled order, twice. The output is sampled in the same cycle it was
// applied, which checks the one-result-per-cycle rate with no latency. Each
// result is compared with the reference model, and the inputs that are stored
// values (0, 1, 5, 9, 13, 15) with the true product 12*Y, including the
// 5 x 12 = 60 case. The test counts how often each mechanism was used: the
// reset path, every shift count 0..3 and every stored word P0..P4, and
// counts a failure for any that never happened.
module tb_multiplier;
  import oms_ref_pkg::*;

  localparam longint COEFF = 12;
  localparam int W     = 8;

  logic         clk = 1'b0;
  logic [3:0]   in;
  logic [W-1:0] out;
  int checks = 0, failures = 0;
  int n_reset = 0;
  int n_shift [4] = '{0, 0, 0, 0};
  int n_word  [5] = '{0, 0, 0, 0, 0};

  multiplier dut (.in(in), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [16];
    int g, k, tmp, j, cycles;
    time t0;
    longint e;
    for (int i = 0; i < 16; i++) order[i] = i;
    @(negedge clk);
    t0 = $time;
    cycles = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 15; i > 0; i--) begin
        j = int'($urandom_range(i));
        tmp = order[i]; order[i] = order[j]; order[j] = tmp;
      end
      for (int i = 0; i < 16; i++) begin
        in = 4'(order[i]);
        @(posedge clk);
        cycles++;
        e = expected(COEFF, order[i], W);
        checks++;
        if (longint'(out) !== e) begin
          failures++;
          $display("FAIL in=%0d out=%0d expected=%0d", order[i], out, e);
        end
        if (order[i] inside {0, 1, 5, 9, 13, 15}) begin
          checks++;
          if (longint'(out) !== COEFF * order[i]) begin
            failures++;
            $display("FAIL stored input %0d: out=%0d, product=%0d", order[i], out, COEFF * order[i]);
          end
        end
        if (order[i] == 0) n_reset++;
        else begin
          classify(order[i], g, k);
          n_shift[k]++;
          n_word[g]++;
        end
        @(negedge clk);
      end
    end
    checks++;
    if (cycles != 32 || ($time - t0) != 32 * 10) begin
      failures++;
      $display("FAIL rate: %0d results in %0t", cycles, $time - t0);
    end
    $display("mechanisms: reset=%0d shift0=%0d shift1=%0d shift2=%0d shift3=%0d",
             n_reset, n_shift[0], n_shift[1], n_shift[2], n_shift[3]);
    $display("words: P0=%0d P1=%0d P2=%0d P3=%0d P4=%0d",
             n_word[0], n_word[1], n_word[2], n_word[3], n_word[4]);
    checks++;
    if (n_reset == 0) failures++;
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (n_shift[s] == 0) failures++;
    end
    for (int w = 0; w < 5; w++) begin
      checks++;
      if (n_word[w] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
