// tb_da_scaling_accumulator: self-checking test of the shift-accumulator.
// Feeds sequences of random partial sums with first/last framing (2 bit
// slices per step, 8 steps), with idle clocks in between, and checks the
// accumulated result against (sum of partial_s * 2**(L*(S-1-s))), and that
// the result register changes only on a last step.
module tb_da_scaling_accumulator;
  localparam int unsigned AW = 40, L = 2, S = 8;
  logic clk = 0, rst = 1, en = 0, first = 0, last = 0;
  logic signed [AW-1:0] partial = '0, result;
  int checks = 0, failures = 0;

  da_scaling_accumulator #(.ACC_W(AW), .DA_UNITS(L)) dut (.clk, .rst, .en, .first, .last, .partial, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expect_v, held;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (result !== '0) begin failures++; $display("result not cleared by reset"); end
    held = 0;
    for (int k = 0; k < 300; k++) begin
      expect_v = 0;
      for (int s = 0; s < S; s++) begin
        int signed v;
        v = $signed($urandom_range(0, 400000)) - 200000;
        expect_v = expect_v * (1 << L) + longint'(v);
        partial = AW'(v); en = 1; first = (s == 0); last = (s == S - 1);
        @(posedge clk); #1;
        en = 0; first = 0; last = 0;
        if (s != S - 1) begin
          checks++;
          if (longint'(result) !== held) begin failures++; $display("result changed before last step"); end
        end
        repeat ($urandom_range(0, 1)) @(posedge clk);  // idle clocks must not disturb the sum
        #1;
      end
      held = expect_v;
      checks++;
      if (longint'(result) !== expect_v) begin
        failures++; $display("result %0d expected %0d", result, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
