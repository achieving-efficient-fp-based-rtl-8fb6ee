// tb_da_top_parallel: end-to-end test of the DA FIR filter with several bit
// slices per clock sharing each table: 12 taps in four 3-tap tables, 4 DA
// units per table (4 read ports), so a 16-bit sample takes 4 clocks. Same
// stimulus and checks as tb_da_top (see da_top_check.svh).
module tb_da_top_parallel;
  localparam int unsigned B = 16, CW = 16, N = 12, M = 3, L = 4, TW = 19, NS = 3000;

  logic CLK = 0, CLK1_16, RST;
  logic [B-1:0] DAT_IN;
  logic COEF_WE;
  logic [$clog2(N)-1:0] COEF_ADDR;
  logic [CW-1:0] COEF_IN;
  logic [B+CW+$clog2(N)-1:0] RESULT;
  logic [TW-1:0] RESULT_trun;
  logic RDEN, LUT_BUSY, SAMPLE_DROPPED;

  da_top #(.N_TAPS(N), .M(M), .DA_UNITS(L)) dut (.*);

  `include "da_top_check.svh"

  initial begin
    wait (tb_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
