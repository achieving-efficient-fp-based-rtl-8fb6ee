// da_lut: one writable DA lookup table, shared by several DA units.
//
// A table of 2**ADDR_W words. Word a holds the sum of the coefficients whose
// address bit is set in a: with three taps, word 3'b101 holds c0 + c2. Because
// the coefficients change at run time the table is a RAM rather than a ROM;
// it is rewritten one word per clock by the refresh unit (we, waddr, wdata).
//
// The table has RD_PORTS asynchronous read ports. Each bit-slice DA unit that
// works in the same clock reads its own port, so all of them share one copy of
// the stored sums instead of holding a private table each. With one bit slice
// per clock (the default) there is one read port.
//
// The words are held in registers (an FPGA's distributed RAM reads the same
// way) and are cleared by reset, which is consistent with all-zero
// coefficients. Read data follows the address in the same cycle; a write is
// seen by reads after the clock edge that performs it.
module da_lut #(
  parameter int unsigned ADDR_W   = da_pkg::LUT_ADDR_W_D,
  parameter int unsigned WORD_W   = da_pkg::lut_word_w(da_pkg::COEF_W_D, da_pkg::LUT_ADDR_W_D),
  parameter int unsigned RD_PORTS = da_pkg::DA_UNITS_D
) (
  input  logic                               clk,
  input  logic                               rst,   // synchronous, active high
  input  logic                               we,
  input  logic [ADDR_W-1:0]                  waddr,
  input  logic [WORD_W-1:0]                  wdata,
  input  logic [RD_PORTS-1:0][ADDR_W-1:0]    raddr,
  output logic [RD_PORTS-1:0][WORD_W-1:0]    rdata
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [WORD_W-1:0] mem_q [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) mem_q[i] <= '0;
    end else if (we) begin
      mem_q[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int r = 0; r < RD_PORTS; r++) rdata[r] = mem_q[raddr[r]];
  end

endmodule
