// da_coef_buffer: the coefficient buffer of the DA FIR filter.
//
// Holds the N filter coefficients in registers so that they can be changed
// while the filter runs. One coefficient is written per clock through a
// simple write port (we, waddr, wdata); the whole set is visible in parallel
// on coef_o, coef_o[n] being c[n], the weight of the sample that is n samples
// old. A write pulses `changed` in the same cycle, which starts the rewrite of
// the lookup tables. Reset clears every coefficient to zero, which matches the
// all-zero tables after reset.
//
// The buffer itself is named in the filter's block diagram; its write port,
// its one-cycle write timing and its reset value are this design's choices.
module da_coef_buffer #(
  parameter int unsigned N_TAPS = da_pkg::N_TAPS_D,
  parameter int unsigned COEF_W = da_pkg::COEF_W_D,
  localparam int unsigned AW    = (N_TAPS > 1) ? $clog2(N_TAPS) : 1
) (
  input  logic                           clk,
  input  logic                           rst,      // synchronous, active high
  input  logic                           we,
  input  logic [AW-1:0]                  waddr,    // tap index; >= N_TAPS ignored
  input  logic [COEF_W-1:0]              wdata,    // two's complement coefficient
  output logic [N_TAPS-1:0][COEF_W-1:0]  coef_o,
  output logic                           changed   // a coefficient is written this cycle
);

  logic [N_TAPS-1:0][COEF_W-1:0] coef_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      coef_q <= '0;
    end else if (we && (32'(waddr) < N_TAPS)) begin
      coef_q[waddr] <= wdata;
    end
  end

  assign coef_o  = coef_q;
  assign changed = we && !rst && (32'(waddr) < N_TAPS);

endmodule
