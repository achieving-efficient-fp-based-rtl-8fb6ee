// tb_da_coef_buffer: self-checking test of the coefficient buffer.
// Writes random coefficients to random taps (including indices past the last
// tap, which must be ignored), keeps its own copy, and compares all outputs
// and the `changed` pulse every clock. Uses 6 taps so that out-of-range
// indices exist on the 3-bit address.
module tb_da_coef_buffer;
  localparam int unsigned N = 6, W = 16, AW = 3;
  logic clk = 0, rst = 1, we = 0, changed;
  logic [AW-1:0] waddr = '0;
  logic [W-1:0]  wdata = '0;
  logic [N-1:0][W-1:0] coef_o;
  logic [W-1:0] model [N];
  int checks = 0, failures = 0;

  da_coef_buffer #(.N_TAPS(N), .COEF_W(W)) dut (.clk, .rst, .we, .waddr, .wdata, .coef_o, .changed);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 400; k++) begin
      we    = ($urandom_range(0, 2) != 0);
      waddr = AW'($urandom_range(0, 7));
      wdata = W'($urandom);
      #1;
      checks++;
      if (changed !== (we && 32'(waddr) < N)) begin
        failures++; $display("changed wrong at k=%0d", k);
      end
      @(posedge clk);
      if (we && 32'(waddr) < N) model[waddr] = wdata;
      #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (coef_o[i] !== model[i]) begin
          failures++; $display("coef[%0d]=%h expected %h", i, coef_o[i], model[i]);
        end
      end
    end
    we = 0; rst = 1;
    @(posedge clk); #1;
    checks++;
    if (coef_o !== '0) begin failures++; $display("reset did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
