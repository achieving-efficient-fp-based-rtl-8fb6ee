// da_control: sample and bit-step sequencer of the DA FIR filter.
//
// samp_clk is the sample clock (CLK1_16: the bit clock divided by B/L, 16 by
// default), sampled in the bit-clock domain; it must come from the same
// source as clk. Its rising edge, seen as samp_clk high after a low sample,
// starts a sample: `start` pulses for one clock, the delay line takes the new
// input and the shifter is loaded. The next STEPS = B/L clocks are bit steps
// (`step`); `first` marks step 0 (which also carries the sign bit, so the
// partial sum of its top slice is subtracted) and `last` marks step STEPS-1.
//
// RDEN (`rden`) is high for the one clock after the last step, when the new
// result is in the output register. A table rewrite that writes during the
// bit steps of a sample would mix two coefficient sets in that sample's sum,
// so such a sample completes without RDEN (`dropped` pulses instead).
//
// Timing: start at edge t, steps at edges t+1 .. t+STEPS, RDEN high after
// edge t+STEPS. A new start may coincide with the last step, so one sample
// every STEPS clocks is the full rate. A start earlier than that abandons the
// sample in progress; an assertion reports it. The signal names CLK1_16 and
// RDEN are the filter's; this sequencing is this design's.
module da_control #(
  parameter int unsigned STEPS = da_pkg::DATA_W_D / da_pkg::DA_UNITS_D,
  localparam int unsigned CW   = (STEPS > 1) ? $clog2(STEPS) : 1
) (
  input  logic clk,
  input  logic rst,          // synchronous, active high
  input  logic samp_clk,     // CLK1_16
  input  logic lut_busy,     // table write enable of the refresh unit
  output logic start,
  output logic step,
  output logic first,
  output logic last,
  output logic rden,         // RDEN: result register holds a fresh, valid output
  output logic dropped       // a sample finished but its sum was invalidated
);

  logic          samp_q;
  logic          active_q;
  logic [CW-1:0] idx_q;
  logic          dirty_q;
  logic          rden_q, dropped_q;

  assign start = samp_clk && !samp_q && !rst;
  assign step  = active_q;
  assign first = active_q && (idx_q == '0);
  assign last  = active_q && (32'(idx_q) == STEPS - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      samp_q    <= 1'b1;   // no start on a sample clock that is already high
      active_q  <= 1'b0;
      idx_q     <= '0;
      dirty_q   <= 1'b0;
      rden_q    <= 1'b0;
      dropped_q <= 1'b0;
    end else begin
      samp_q    <= samp_clk;
      rden_q    <= last && !(dirty_q || lut_busy);
      dropped_q <= last &&  (dirty_q || lut_busy);
      if (start) begin
        active_q <= 1'b1;
        idx_q    <= '0;
        dirty_q  <= 1'b0;
      end else if (active_q) begin
        idx_q   <= idx_q + 1'b1;
        dirty_q <= dirty_q || lut_busy;
        if (last) active_q <= 1'b0;
      end
    end
  end

  assign rden    = rden_q;
  assign dropped = dropped_q;

  // A new sample must not arrive before the previous one finished.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) start |-> (!active_q || last))
    else $error("sample clock faster than one sample per %0d clocks", STEPS);

endmodule
