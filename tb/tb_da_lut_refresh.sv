// tb_da_lut_refresh: self-checking test of the table rewrite unit.
// 8 taps in two partitions of 4. After each start the test collects every
// write (address and data of both partitions), checks each word against the
// subset sums of the coefficients computed here, checks that every address
// is written exactly once in 2**M clocks, and that busy then falls. It also
// restarts a rewrite half way with new coefficients and expects the final
// table to match the new set.
module tb_da_lut_refresh;
  localparam int unsigned N = 8, W = 16, M = 4, P = 2, WW = 18;
  logic clk = 0, rst = 1, start = 0, busy;
  logic [N-1:0][W-1:0] coef = '0;
  logic [M-1:0] waddr;
  logic [P-1:0][WW-1:0] wdata;
  int checks = 0, failures = 0;
  logic [WW-1:0] table_q [P][1 << M];
  int writes [1 << M];

  da_lut_refresh #(.N_TAPS(N), .COEF_W(W), .M(M)) dut (.clk, .rst, .start, .coef, .busy, .waddr, .wdata);

  always #5 clk = ~clk;

  // Observe what the unit writes, as a table RAM would.
  always @(posedge clk) if (!rst && busy) begin
    for (int p = 0; p < P; p++) table_q[p][waddr] <= wdata[p];
    writes[waddr]++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [WW-1:0] subset(int p, int a);
    longint s = 0;
    for (int i = 0; i < M; i++) if (a[i]) s += longint'($signed(coef[p*M + i]));
    return WW'(s);
  endfunction

  task automatic run_refresh(int interrupt_after);
    int cycles = 0;
    for (int a = 0; a < (1 << M); a++) writes[a] = 0;
    for (int n = 0; n < N; n++) coef[n] = W'($urandom);
    if ($urandom_range(0, 3) == 0) coef[0] = 16'h8000;   // most negative value
    start = 1; @(posedge clk); #1 start = 0;
    if (interrupt_after > 0) begin
      repeat (interrupt_after) @(posedge clk);
      #1;
      for (int n = 0; n < N; n++) coef[n] = W'($urandom);
      start = 1; @(posedge clk); #1 start = 0;
      for (int a = 0; a < (1 << M); a++) writes[a] = 0;
    end
    while (busy) begin
      @(posedge clk); #1; cycles++;
      if (cycles > 100) break;
    end
    checks++;
    if (cycles != (1 << M)) begin failures++; $display("rewrite took %0d clocks", cycles); end
    for (int a = 0; a < (1 << M); a++) begin
      checks++;
      if (writes[a] != 1) begin failures++; $display("address %0d written %0d times", a, writes[a]); end
      for (int p = 0; p < P; p++) begin
        checks++;
        if (table_q[p][a] !== subset(p, a)) begin
          failures++; $display("part %0d word %0d = %h expected %h", p, a, table_q[p][a], subset(p, a));
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (busy) begin failures++; $display("busy after reset"); end
    for (int t = 0; t < 20; t++) run_refresh((t % 4 == 3) ? 7 : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
