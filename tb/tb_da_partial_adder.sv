// tb_da_partial_adder: self-checking test of the bit-step adder.
// 3 partitions, 2 bit slices, 18-bit words, 35-bit result. Random and
// extreme words, with and without the sign slice, are compared with a sum
// computed here in 64-bit integers.
module tb_da_partial_adder;
  localparam int unsigned P = 3, L = 2, WW = 18, AW = 35;
  logic [L-1:0][P-1:0][WW-1:0] word;
  logic msb_group;
  logic signed [AW-1:0] partial;
  int checks = 0, failures = 0;

  da_partial_adder #(.P(P), .DA_UNITS(L), .WORD_W(WW), .ACC_W(AW)) dut (.word, .msb_group, .partial);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      longint expect_v;
      expect_v = 0;
      for (int j = 0; j < L; j++)
        for (int p = 0; p < P; p++) begin
          case ($urandom_range(0, 5))
            0: word[j][p] = 18'h20000;       // most negative
            1: word[j][p] = 18'h1ffff;       // most positive
            default: word[j][p] = WW'($urandom);
          endcase
        end
      msb_group = ($urandom_range(0, 1) != 0);
      for (int j = 0; j < L; j++) begin
        longint s;
        s = 0;
        for (int p = 0; p < P; p++) s += longint'($signed(word[j][p]));
        s = s * (longint'(1) << j);
        if (msb_group && j == L - 1) expect_v -= s; else expect_v += s;
      end
      #1;
      checks++;
      if (longint'(partial) !== expect_v) begin
        failures++; $display("partial %0d expected %0d", partial, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
