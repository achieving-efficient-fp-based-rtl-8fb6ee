// da_input_shifter: input buffer and 2D shifter of the DA FIR filter.
//
// The input buffer is the tap delay line: on `load` the new sample din enters
// tap 0 and every older sample moves one tap down, x[n] <= x[n-1]. In the
// same clock a working copy of all N taps is loaded into the 2D shifter. On
// every `shift` each tap of the copy moves L bits towards its MSB, so that
// the L most significant bits still unprocessed sit at the top of every tap.
// These bits of all taps form the bit slice that addresses the lookup
// tables, most significant bit first:
//     slice[n][j] = bit (B-1 - s*L - (L-1-j)) of x[n] after s shifts.
// slice[n][L-1] is the most significant of the L bits of tap n.
//
// `load` takes priority over `shift`, which lets a new sample start in the
// same clock as the last bit step of the previous one. Reset clears the delay
// line (the filter starts from silence).
//
// The delay line and the shifter feeding the table address lines follow the
// filter's block diagrams; the MSB-first order and the separate working copy
// are this design's choices.
module da_input_shifter #(
  parameter int unsigned N_TAPS   = da_pkg::N_TAPS_D,
  parameter int unsigned DATA_W   = da_pkg::DATA_W_D,
  parameter int unsigned DA_UNITS = da_pkg::DA_UNITS_D
) (
  input  logic                               clk,
  input  logic                               rst,    // synchronous, active high
  input  logic                               load,
  input  logic                               shift,
  input  logic [DATA_W-1:0]                  din,
  output logic [N_TAPS-1:0][DA_UNITS-1:0]    slice,
  output logic [N_TAPS-1:0][DATA_W-1:0]      taps     // delay line contents
);

  logic [N_TAPS-1:0][DATA_W-1:0] taps_q, sh_q, taps_next;

  always_comb begin
    taps_next[0] = din;
    for (int n = 1; n < N_TAPS; n++) taps_next[n] = taps_q[n-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      taps_q <= '0;
      sh_q   <= '0;
    end else if (load) begin
      taps_q <= taps_next;
      sh_q   <= taps_next;
    end else if (shift) begin
      for (int n = 0; n < N_TAPS; n++) sh_q[n] <= sh_q[n] << DA_UNITS;
    end
  end

  always_comb begin
    for (int n = 0; n < N_TAPS; n++) slice[n] = sh_q[n][DATA_W-1 -: DA_UNITS];
  end

  assign taps = taps_q;

endmodule
