// da_top_check.svh: stimulus and checking shared by the da_top testbenches.
//
// The including module declares the sizes (B, CW, N, M, L, TW, NS), the DUT
// signals and the DUT itself. This body then runs NS samples through the
// filter with a sample clock whose period is mostly B/L clocks (full rate)
// and sometimes longer, and rewrites the coefficients at random moments,
// some of them in the middle of a sample. For every sample it expects,
// exactly B/L + 1 clocks after the clock that took the sample, either RDEN
// with RESULT equal to the inner product computed here from its own copy of
// the delay line and of the coefficients that were in the tables, or
// SAMPLE_DROPPED when a table rewrite overlapped the sample's bit steps.
// When the run ends, or the watchdog expires, it sets tb_done; the including
// module then prints the result line and finishes.
// RESULT_trun must equal the top TW bits of RESULT. The mechanisms that must
// each occur at least once are counted and reported.

  localparam int unsigned S   = B / L;
  localparam int unsigned AW  = B + CW + $clog2(N);
  localparam int unsigned CAW = (N > 1) ? $clog2(N) : 1;

  int checks = 0, failures = 0;
  bit tb_done = 0;
  int n_rden = 0, n_drop = 0, n_fullrate = 0, n_reconf = 0, n_neg = 0, n_minin = 0, n_newcoef = 0;

  always #5 CLK = ~CLK;

  initial begin
    repeat (NS * 30 + 2000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    tb_done = 1;
  end

  longint coef_m [N];      // coefficients as written
  longint lut_m  [N];      // coefficients the tables hold after the last completed rewrite
  longint hist   [N];      // delay line
  typedef longint hvec_t [N];
  hvec_t  exp_hist [int];  // delay line of each sample, by cycle of its RDEN
  int     exp_busy [int];  // 1 if that sample's steps overlapped a rewrite
  int     busy_from = -1, busy_to = -1;   // edges that write the tables
  int     c = 0, phase = 0, period = S, prev_start = -1000, pending = 0, wr_idx = -1;
  bit     samp_prev = 1;
  logic signed [AW-1:0] last_result;
  bit     lut_changed_since_rden = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("cycle %0d: %s", c, msg); end
  endtask

  function automatic longint rand_coef();
    case ($urandom_range(0, 9))
      0: return -32768;
      1: return 32767;
      default: return longint'($signed(CW'($urandom)));
    endcase
  endfunction

  initial begin
    automatic int n_samp = 0;
    for (int n = 0; n < N; n++) begin coef_m[n] = 0; lut_m[n] = 0; hist[n] = 0; end
    CLK1_16 = 0; DAT_IN = '0; COEF_WE = 0; COEF_ADDR = '0; COEF_IN = '0; RST = 1;
    repeat (3) @(negedge CLK);
    RST = 0;
    while (n_samp < NS || pending > 0) begin
      bit start;
      // Coefficient rewrite: all N taps in consecutive clocks.
      COEF_WE = 0;
      if (wr_idx < 0 && n_samp < NS && (c == 2 || $urandom_range(0, 400) == 0)) wr_idx = 0;
      if (wr_idx >= 0) begin
        longint v;
        v = rand_coef();
        COEF_WE = 1; COEF_ADDR = CAW'(wr_idx); COEF_IN = CW'(v);
        coef_m[wr_idx] = v;
        busy_from = c + 1; busy_to = c + (1 << M);
        // Samples already running whose steps (edges k-S .. k-1) meet these writes.
        foreach (exp_busy[k]) if (busy_from <= k - 1 && busy_to >= k - S) exp_busy[k] = 1;
        wr_idx = (wr_idx == N - 1) ? -1 : wr_idx + 1;
        if (wr_idx < 0) n_reconf++;
      end
      // Sample clock.
      phase++;
      if (phase >= period) begin
        phase = 0;
        period = ($urandom_range(0, 3) == 0) ? S + $urandom_range(1, 8) : S;
      end
      CLK1_16 = (phase < S / 2) && (c > 40) && (n_samp < NS);
      start = CLK1_16 && !samp_prev;
      if (start) begin
        case ($urandom_range(0, 7))
          0: DAT_IN = B'(1) << (B - 1);       // most negative sample
          1: DAT_IN = ~(B'(1) << (B - 1));    // most positive sample
          default: DAT_IN = B'($urandom);
        endcase
      end
      #1;
      // Outputs of the previous edge.
      check(RESULT_trun == RESULT[AW-1 -: TW], "RESULT_trun is not the top bits of RESULT");
      if (exp_hist.exists(c)) begin
        if (exp_busy[c] != 0) check(SAMPLE_DROPPED && !RDEN, "sample overlapping a rewrite not dropped");
        else begin
          longint y;
          y = 0;
          check(RDEN && !SAMPLE_DROPPED, "RDEN missing B/L+1 clocks after the sample");
          for (int n = 0; n < N; n++) y += lut_m[n] * exp_hist[c][n];
          check(longint'($signed(RESULT)) == y, $sformatf("RESULT %0d expected %0d", $signed(RESULT), y));
          if (y < 0) n_neg++;
          if (lut_changed_since_rden) n_newcoef++;
          lut_changed_since_rden = 0;
        end
        if (RDEN) n_rden++;
        if (SAMPLE_DROPPED) n_drop++;
        exp_hist.delete(c); exp_busy.delete(c);
        pending--;
      end else begin
        check(!RDEN && !SAMPLE_DROPPED, "RDEN or SAMPLE_DROPPED without a sample");
      end
      // What the coming edge does.
      if (c == busy_to) begin
        for (int n = 0; n < N; n++) lut_m[n] = coef_m[n];
        lut_changed_since_rden = 1;
      end
      if (start) begin
        int ovl;
        for (int n = N - 1; n > 0; n--) hist[n] = hist[n-1];
        hist[0] = longint'($signed(DAT_IN));
        if (DAT_IN == B'(1) << (B - 1)) n_minin++;
        if (c - prev_start == S) n_fullrate++;
        prev_start = c;
        n_samp++;
        pending++;
        // Tables during the steps (edges c+1 .. c+S): any write there drops the sample.
        ovl = 0;
        for (int e = c + 1; e <= c + S; e++) if (e >= busy_from && e <= busy_to) ovl = 1;
        // Planned writes (a rewrite starting later) are checked when they happen.
        begin
          int k;
          k = c + S + 1;
          exp_busy[k] = ovl;
          for (int n = 0; n < N; n++) exp_hist[k][n] = hist[n];
        end
      end
      samp_prev = CLK1_16;
      c++;
      @(negedge CLK);
    end
    check(n_rden > NS / 2, "too few results");
    check(n_drop > 0, "no sample was dropped by a rewrite");
    check(n_fullrate > 0, "no back-to-back samples at full rate");
    check(n_reconf > 1, "coefficients were not reconfigured");
    check(n_newcoef > 1, "no result after a reconfiguration");
    check(n_neg > 0, "no negative result");
    check(n_minin > 0, "most negative sample never used");
    $display("results %0d dropped %0d full-rate %0d reconfigurations %0d after-reconf %0d negative %0d min-input %0d",
             n_rden, n_drop, n_fullrate, n_reconf, n_newcoef, n_neg, n_minin);
    tb_done = 1;
  end
