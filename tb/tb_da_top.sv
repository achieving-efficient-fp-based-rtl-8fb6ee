// tb_da_top: end-to-end test of the DA FIR filter at its default sizes
// (16-bit samples and coefficients, 8 taps in two 4-tap tables, one bit per
// clock, so one sample per 16 clocks). Runs 3000 samples with random data
// and random run-time coefficient rewrites; see da_top_check.svh for what is
// checked.
module tb_da_top;
  localparam int unsigned B = 16, CW = 16, N = 8, M = 4, L = 1, TW = 19, NS = 3000;

  logic CLK = 0, CLK1_16, RST;
  logic [B-1:0] DAT_IN;
  logic COEF_WE;
  logic [$clog2(N)-1:0] COEF_ADDR;
  logic [CW-1:0] COEF_IN;
  logic [B+CW+$clog2(N)-1:0] RESULT;
  logic [TW-1:0] RESULT_trun;
  logic RDEN, LUT_BUSY, SAMPLE_DROPPED;

  da_top dut (.*);

  `include "da_top_check.svh"

  initial begin
    wait (tb_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
