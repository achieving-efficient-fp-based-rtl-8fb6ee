// tb_da_control: self-checking test of the sample and bit-step sequencer.
// The sample clock is a divided clock whose period varies between 16 and 21
// bit clocks (16 is the full rate). Table-rewrite bursts of 16 clocks are
// inserted now and then. Every clock the test checks start, step, first,
// last, RDEN and dropped against the rule: a start on each rising sample
// clock edge, steps in the 16 clocks after it, RDEN in the clock after the
// last step unless a rewrite was busy during a step, then dropped instead.
module tb_da_control;
  localparam int unsigned S = 16;
  logic clk = 0, rst = 1, samp_clk = 0, lut_busy = 0;
  logic start, step, first, last, rden, dropped;
  int checks = 0, failures = 0;
  int n_start = 0, n_rden = 0, n_drop = 0, n_fullrate = 0;

  da_control #(.STEPS(S)) dut (.clk, .rst, .samp_clk, .lut_busy, .start, .step, .first, .last, .rden, .dropped);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  c = 0, start_cyc = -1000, prev_start = -1000, due_cyc = -1;
  bit  due_ok, busy_in_sample, samp_prev = 1;
  int  phase = 0, period = 16, busy_left = 0;

  task automatic expect_eq(string name, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("cycle %0d: %s = %0b expected %0b", c, name, got, exp); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int k = 0; k < 20000; k++) begin
      bit es, est, ef, el;
      int d;
      // Drive this clock's inputs.
      phase++;
      if (phase >= period) begin phase = 0; period = (k < 5000) ? 16 : $urandom_range(16, 21); end
      samp_clk = (phase < 8);
      if (busy_left > 0) busy_left--;
      else if ($urandom_range(0, 150) == 0) busy_left = 16;
      lut_busy = (busy_left > 0);
      // Outputs expected before the coming clock edge.
      es = samp_clk && !samp_prev;
      d  = c - start_cyc;
      est = (d >= 1 && d <= S);
      ef  = (d == 1);
      el  = (d == S);
      #1;
      expect_eq("start", start, es);
      expect_eq("step", step, est);
      expect_eq("first", first, ef);
      expect_eq("last", last, el);
      expect_eq("rden", rden, (c == due_cyc) && due_ok);
      expect_eq("dropped", dropped, (c == due_cyc) && !due_ok);
      if (rden) n_rden++;
      if (dropped) n_drop++;
      // Book-keeping of what the edge does.
      if (est && lut_busy) busy_in_sample = 1;
      if (el) begin due_cyc = c + 1; due_ok = !busy_in_sample; end
      if (es) begin
        if (c - prev_start == S) n_fullrate++;
        prev_start = c; start_cyc = c; busy_in_sample = 0; n_start++;
      end
      samp_prev = samp_clk;
      c++;
      @(negedge clk);
    end
    checks++;
    if (n_start < 100 || n_rden < 50 || n_drop == 0 || n_fullrate == 0) begin
      failures++;
      $display("coverage: starts %0d rden %0d dropped %0d full-rate %0d", n_start, n_rden, n_drop, n_fullrate);
    end
    $display("starts %0d rden %0d dropped %0d full-rate %0d", n_start, n_rden, n_drop, n_fullrate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
