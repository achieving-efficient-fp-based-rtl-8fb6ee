// da_lut_refresh: rewrites the DA lookup tables after a coefficient change.
//
// The N taps are split into P = N / M partitions of M consecutive taps; each
// partition has its own 2**M-word table (the decomposed-RAM arrangement, which
// keeps the table size at 2**M instead of 2**N words). When `start` pulses,
// the unit walks the table address a = 0 .. 2**M-1, one address per clock,
// and for every partition p writes
//     word[p][a] = sum over i < M with a[i] = 1 of c[p*M + i]
// into all P tables at once. A new `start` while a rewrite is running begins
// again at address 0, so the tables always end up matching the latest
// coefficients.
//
// Timing: start at clock edge e sets busy; the writes happen at edges e+1 ..
// e+2**M, and busy falls after the last one. `busy` equals the table write
// enable. The subset sums are formed with plain adders from the coefficient
// registers, one address per clock; the ordering and timing are this design's
// choices, the table contents are the DA table of the filter.
module da_lut_refresh #(
  parameter int unsigned N_TAPS  = da_pkg::N_TAPS_D,
  parameter int unsigned COEF_W  = da_pkg::COEF_W_D,
  parameter int unsigned M       = da_pkg::LUT_ADDR_W_D,
  localparam int unsigned P      = N_TAPS / M,
  localparam int unsigned WORD_W = da_pkg::lut_word_w(COEF_W, M)
) (
  input  logic                           clk,
  input  logic                           rst,     // synchronous, active high
  input  logic                           start,
  input  logic [N_TAPS-1:0][COEF_W-1:0]  coef,
  output logic                           busy,    // = table write enable
  output logic [M-1:0]                   waddr,
  output logic [P-1:0][WORD_W-1:0]       wdata
);

  if (N_TAPS % M != 0) begin : g_bad_split
    $error("N_TAPS must be a multiple of M");
  end

  logic         busy_q;
  logic [M-1:0] addr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q <= 1'b0;
      addr_q <= '0;
    end else if (start) begin
      busy_q <= 1'b1;
      addr_q <= '0;
    end else if (busy_q) begin
      addr_q <= addr_q + 1'b1;
      if (&addr_q) busy_q <= 1'b0;
    end
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      logic signed [WORD_W-1:0] sum;
      sum = '0;
      for (int i = 0; i < M; i++) begin
        if (addr_q[i]) sum = sum + WORD_W'($signed(coef[p*M + i]));
      end
      wdata[p] = sum;
    end
  end

  assign busy  = busy_q;
  assign waddr = addr_q;

endmodule
