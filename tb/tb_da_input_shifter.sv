// tb_da_input_shifter: self-checking test of the delay line and 2D shifter.
// 5 taps of 16 bits, 2 bit slices per clock. After every load the test
// checks the delay line against its own sample history, then shifts 8 times
// and checks every slice against the bits of the stored samples, MSB first.
// Some loads are issued together with a shift, where load must win.
module tb_da_input_shifter;
  localparam int unsigned N = 5, B = 16, L = 2, S = B / L;
  logic clk = 0, rst = 1, load = 0, shift = 0;
  logic [B-1:0] din = '0;
  logic [N-1:0][L-1:0] slice;
  logic [N-1:0][B-1:0] taps;
  logic [B-1:0] hist [N];
  int checks = 0, failures = 0;

  da_input_shifter #(.N_TAPS(N), .DATA_W(B), .DA_UNITS(L)) dut (.clk, .rst, .load, .shift, .din, .slice, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < N; n++) hist[n] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 60; k++) begin
      din = B'($urandom);
      if (k % 7 == 3) din = 16'h8000;
      load = 1; shift = (k % 3 == 0);
      @(posedge clk); #1 load = 0; shift = 0;
      for (int n = N - 1; n > 0; n--) hist[n] = hist[n-1];
      hist[0] = din;
      for (int n = 0; n < N; n++) begin
        checks++;
        if (taps[n] !== hist[n]) begin failures++; $display("tap %0d = %h expected %h", n, taps[n], hist[n]); end
      end
      for (int s = 0; s < S; s++) begin
        for (int n = 0; n < N; n++)
          for (int j = 0; j < L; j++) begin
            checks++;
            if (slice[n][j] !== hist[n][B - 1 - s*L - (L - 1 - j)]) begin
              failures++; $display("step %0d tap %0d bit %0d wrong", s, n, j);
            end
          end
        shift = 1; @(posedge clk); #1 shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
