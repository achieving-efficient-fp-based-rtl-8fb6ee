// da_scaling_accumulator: the shift-and-add accumulator of the DA filter.
//
// The register is fed back through a shifter into the adder: on each bit
// step (en) the accumulator becomes
//     acc <= (acc << L) + partial          or  acc <= partial  when first
// Bit slices arrive most significant first, so after B/L steps the register
// holds the complete inner product sum_n c[n] x[n]. On the step that has
// `last` set, the new value is also copied into the result register, which
// holds the filter output until the next sample's result replaces it.
//
// The adder, register and feedback shifter are those of the filter's block
// diagram; MSB-first order (a left shift instead of a right shift) and the
// separate result register are this design's choices. All arithmetic is
// ACC_W bits wide, enough for the full inner product, so nothing overflows.
module da_scaling_accumulator #(
  parameter int unsigned ACC_W    = da_pkg::acc_w(da_pkg::DATA_W_D, da_pkg::COEF_W_D, da_pkg::N_TAPS_D),
  parameter int unsigned DA_UNITS = da_pkg::DA_UNITS_D
) (
  input  logic                     clk,
  input  logic                     rst,     // synchronous, active high
  input  logic                     en,      // one bit step this clock
  input  logic                     first,   // first step of a sample: discard old sum
  input  logic                     last,    // last step: update the result register
  input  logic signed [ACC_W-1:0]  partial,
  output logic signed [ACC_W-1:0]  result
);

  logic signed [ACC_W-1:0] acc_q, acc_next, res_q;

  assign acc_next = first ? partial : (acc_q <<< DA_UNITS) + partial;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_q <= '0;
      res_q <= '0;
    end else if (en) begin
      acc_q <= acc_next;
      if (last) res_q <= acc_next;
    end
  end

  assign result = res_q;

endmodule
