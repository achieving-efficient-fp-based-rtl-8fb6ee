// da_top: reconfigurable distributed-arithmetic FIR filter (DA_top).
//
// Computes y[k] = sum_{n<N} c[n] * x[k-n] for 16-bit two's complement samples
// without a multiplier. Each sample is split into bit slices: in each clock
// the next bit of every tap (L bits with L DA units) addresses the lookup
// tables, whose words are precomputed sums of coefficients, and a scaling
// accumulator adds the table outputs with their binary weights, most
// significant bit first. With the default L = 1 a sample takes B = 16 clocks,
// which is why the sample clock CLK1_16 runs at 1/16 of CLK.
//
// The coefficients can be rewritten while the filter runs (COEF_WE,
// COEF_ADDR, COEF_IN). The N taps are split into P = N/M groups of M taps,
// each with its own 2**M-word RAM table instead of one 2**N-word table; after
// every coefficient write the refresh unit recomputes all table words in
// 2**M clocks (LUT_BUSY high). A sample whose bit steps overlap that rewrite
// finishes without RDEN.
//
// Interface: DAT_IN[15:0], CLK, CLK1_16, RST, RESULT[34:0], RESULT_trun[18:0]
// and RDEN are the ports of the filter's symbol. RESULT is the exact inner
// product; RESULT_trun is its top TRUNC_W bits, RESULT[34:16] by default.
// RDEN is high for one clock when RESULT holds a new valid output. The
// coefficient write port, LUT_BUSY and SAMPLE_DROPPED are this design's
// additions. RST is synchronous and active high; CLK1_16 must be derived
// from CLK.
//
// Timing: the CLK edge that sees CLK1_16 newly high takes DAT_IN; B/L edges
// later RESULT is updated and RDEN is high for the following clock.
module da_top #(
  parameter int unsigned DATA_W   = da_pkg::DATA_W_D,
  parameter int unsigned COEF_W   = da_pkg::COEF_W_D,
  parameter int unsigned N_TAPS   = da_pkg::N_TAPS_D,
  parameter int unsigned M        = da_pkg::LUT_ADDR_W_D,
  parameter int unsigned DA_UNITS = da_pkg::DA_UNITS_D,
  parameter int unsigned TRUNC_W  = da_pkg::TRUNC_W_D,
  localparam int unsigned ACC_W   = da_pkg::acc_w(DATA_W, COEF_W, N_TAPS),
  localparam int unsigned P       = N_TAPS / M,
  localparam int unsigned WORD_W  = da_pkg::lut_word_w(COEF_W, M),
  localparam int unsigned STEPS   = DATA_W / DA_UNITS,
  localparam int unsigned CAW     = (N_TAPS > 1) ? $clog2(N_TAPS) : 1
) (
  input  logic                CLK,
  input  logic                CLK1_16,
  input  logic                RST,
  input  logic [DATA_W-1:0]   DAT_IN,
  input  logic                COEF_WE,
  input  logic [CAW-1:0]      COEF_ADDR,
  input  logic [COEF_W-1:0]   COEF_IN,
  output logic [ACC_W-1:0]    RESULT,
  output logic [TRUNC_W-1:0]  RESULT_trun,
  output logic                RDEN,
  output logic                LUT_BUSY,
  output logic                SAMPLE_DROPPED
);

  if (DATA_W % DA_UNITS != 0) begin : g_bad_units
    $error("DATA_W must be a multiple of DA_UNITS");
  end
  if (TRUNC_W > ACC_W) begin : g_bad_trunc
    $error("TRUNC_W must not exceed the result width");
  end

  logic                              start, step, first, last;
  logic [N_TAPS-1:0][COEF_W-1:0]     coef;
  logic                              coef_changed;
  logic                              lut_we;
  logic [M-1:0]                      lut_waddr;
  logic [P-1:0][WORD_W-1:0]          lut_wdata;
  logic [N_TAPS-1:0][DA_UNITS-1:0]   slice;
  logic [N_TAPS-1:0][DATA_W-1:0]     taps;
  logic [DA_UNITS-1:0][P-1:0][WORD_W-1:0] lut_word;
  logic signed [ACC_W-1:0]           partial, result;

  da_control #(.STEPS(STEPS)) u_ctrl (
    .clk(CLK), .rst(RST), .samp_clk(CLK1_16), .lut_busy(lut_we),
    .start, .step, .first, .last, .rden(RDEN), .dropped(SAMPLE_DROPPED)
  );

  da_coef_buffer #(.N_TAPS(N_TAPS), .COEF_W(COEF_W)) u_coef (
    .clk(CLK), .rst(RST), .we(COEF_WE), .waddr(COEF_ADDR), .wdata(COEF_IN),
    .coef_o(coef), .changed(coef_changed)
  );

  da_lut_refresh #(.N_TAPS(N_TAPS), .COEF_W(COEF_W), .M(M)) u_refresh (
    .clk(CLK), .rst(RST), .start(coef_changed), .coef,
    .busy(lut_we), .waddr(lut_waddr), .wdata(lut_wdata)
  );

  da_input_shifter #(.N_TAPS(N_TAPS), .DATA_W(DATA_W), .DA_UNITS(DA_UNITS)) u_in (
    .clk(CLK), .rst(RST), .load(start), .shift(step), .din(DAT_IN), .slice, .taps
  );

  // One table per partition; each has one read port per DA unit. Port j of
  // partition p is addressed by bit j of the current slice of taps
  // p*M .. p*M+M-1 (tap p*M+i drives address bit i).
  for (genvar p = 0; p < P; p++) begin : g_part
    logic [DA_UNITS-1:0][M-1:0]      raddr;
    logic [DA_UNITS-1:0][WORD_W-1:0] rdata;

    always_comb begin
      for (int j = 0; j < DA_UNITS; j++)
        for (int i = 0; i < M; i++) raddr[j][i] = slice[p*M + i][j];
      for (int j = 0; j < DA_UNITS; j++) lut_word[j][p] = rdata[j];
    end

    da_lut #(.ADDR_W(M), .WORD_W(WORD_W), .RD_PORTS(DA_UNITS)) u_lut (
      .clk(CLK), .rst(RST), .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata[p]),
      .raddr, .rdata
    );
  end

  da_partial_adder #(.P(P), .DA_UNITS(DA_UNITS), .WORD_W(WORD_W), .ACC_W(ACC_W)) u_add (
    .word(lut_word), .msb_group(first), .partial
  );

  da_scaling_accumulator #(.ACC_W(ACC_W), .DA_UNITS(DA_UNITS)) u_acc (
    .clk(CLK), .rst(RST), .en(step), .first, .last, .partial, .result
  );

  assign RESULT      = result;
  assign RESULT_trun = result[ACC_W-1 -: TRUNC_W];
  assign LUT_BUSY    = lut_we;

endmodule
