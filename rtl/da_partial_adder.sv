// da_partial_adder: combines the table outputs of one bit step.
//
// In one clock, L bit slices (DA units) each read one word from each of the P
// table partitions. This adder forms
//     partial = sum over j < L of  w_j * 2**j * (sum over p < P of word[j][p])
// where w_j = +1, except w_(L-1) = -1 when msb_group is set: the slice that
// holds the sign bit of the two's complement samples carries weight -2**(B-1)
// and is therefore subtracted. The result is sign-extended to ACC_W bits and
// goes to the scaling accumulator.
//
// Purely combinational. Adding the partitions' outputs is what splitting the
// table requires; the sign handling is standard two's complement DA, which
// the filter needs for signed samples.
module da_partial_adder #(
  parameter int unsigned P        = da_pkg::N_TAPS_D / da_pkg::LUT_ADDR_W_D,
  parameter int unsigned DA_UNITS = da_pkg::DA_UNITS_D,
  parameter int unsigned WORD_W   = da_pkg::lut_word_w(da_pkg::COEF_W_D, da_pkg::LUT_ADDR_W_D),
  parameter int unsigned ACC_W    = da_pkg::acc_w(da_pkg::DATA_W_D, da_pkg::COEF_W_D, da_pkg::N_TAPS_D)
) (
  input  logic [DA_UNITS-1:0][P-1:0][WORD_W-1:0] word,
  input  logic                                   msb_group,
  output logic signed [ACC_W-1:0]                partial
);

  always_comb begin
    logic signed [ACC_W-1:0] slice_sum;
    partial = '0;
    for (int j = 0; j < DA_UNITS; j++) begin
      slice_sum = '0;
      for (int p = 0; p < P; p++) slice_sum = slice_sum + ACC_W'($signed(word[j][p]));
      slice_sum = slice_sum <<< j;
      if (msb_group && (j == DA_UNITS - 1)) partial = partial - slice_sum;
      else                                  partial = partial + slice_sum;
    end
  end

endmodule
