// tb_da_lut: self-checking test of the shared lookup table.
// Two read ports and 3 address bits. Random writes and random reads on both
// ports every clock, checked against a reference array; a write must be
// visible only after its clock edge. Reset must clear every word.
module tb_da_lut;
  localparam int unsigned AW = 3, W = 18, R = 2;
  logic clk = 0, rst = 1, we = 0;
  logic [AW-1:0] waddr = '0;
  logic [W-1:0]  wdata = '0;
  logic [R-1:0][AW-1:0] raddr = '0;
  logic [R-1:0][W-1:0]  rdata;
  logic [W-1:0] model [1 << AW];
  int checks = 0, failures = 0;

  da_lut #(.ADDR_W(AW), .WORD_W(W), .RD_PORTS(R)) dut (.clk, .rst, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads(string tag);
    for (int r = 0; r < R; r++) begin
      checks++;
      if (rdata[r] !== model[raddr[r]]) begin
        failures++;
        $display("%s: port %0d addr %0d read %h expected %h", tag, r, raddr[r], rdata[r], model[raddr[r]]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << AW); i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int a = 0; a < (1 << AW); a++) begin
      raddr[0] = AW'(a); raddr[1] = AW'(7 - a); #1;
      check_reads("after reset");
    end
    for (int k = 0; k < 500; k++) begin
      we    = ($urandom_range(0, 1) != 0);
      waddr = AW'($urandom);
      wdata = W'($urandom);
      raddr[0] = waddr;            // same word as the write: old value before the edge
      raddr[1] = AW'($urandom);
      #1 check_reads("before edge");
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1 check_reads("after edge");
    end
    we = 0; rst = 1;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < (1 << AW); i++) model[i] = '0;
    for (int a = 0; a < (1 << AW); a++) begin
      raddr[0] = AW'(a); raddr[1] = AW'(a); #1;
      check_reads("second reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
