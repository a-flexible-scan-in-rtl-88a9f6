// lbist_teg_top_tb -- end-to-end testbench of lbist_teg_top at its default
// (test-chip) size: 90 scan chains of 83/82 flip-flops, 22-bit LFSR,
// optimized dynamically controlled PLPFs, 11-bit MISR, three ring
// oscillators. The circuit under test is b22_scan_model.
//
// Sessions of ROUNDS rounds are run with
//   * the Basic approach at the seven switch timings of the chip
//     measurement (7 % .. 50 % targets),
//   * the Swap approach, the Moving approach (with a wrap-around of its
//     window) and external control words "10" (n=2) and "11" (n=1).
// In every shift clock and for every chain the scan-in bit is compared with
// a reference filter fed with the chain's own LFSR stream (its future bits
// are taken from the stream two clocks later, not from the phase shifter)
// and with the control word the approach should give at that position.
// The scan-outs of rounds 2.. are compacted by a reference MISR and the
// final signature compared. The weighted transition metric (WTM) of the
// scan-in patterns is measured after the first WARM vectors and compared
// with the three-part formula, which assumes a raw stream toggling 50 % of
// the time. The sparse 22-bit trinomial LFSR started from all ones toggles
// less than that for several thousand clocks (about 46-48 % in the window
// used here), so the measured WTM sits a few per cent low: it must lie
// within 12 % (relative) of the prediction, grow with the target, and
// correlate with the prediction better than 0.99 over the seven settings. The ring oscillators are measured through the
// top. Each mechanism (window switch, swap, move, wrap, n=2 filtering,
// capture, compaction, RO measurement) must occur at least once.
module lbist_teg_top_tb;
  import lbist_pkg::*;

  localparam int NC     = TEG_CHAINS;
  localparam int L      = TEG_CHAIN_LEN;
  localparam int ROUNDS = 24;
  localparam int WARM   = 12;          // vectors skipped for the WTM average
  localparam int MAXS   = ROUNDS * L;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [15:0] num_patterns;
  approach_e   approach;
  plpf_ctrl_t  ext_ctrl;
  logic [6:0]  alpha, beta;
  logic        busy, done, se;
  logic [10:0] signature;
  logic [NC-1:0] scan_in, scan_ff1, scan_ff2, scan_out;
  logic [2:0]  ro_en;
  logic [1:0]  ro_sel;
  logic        ro_start = 1'b0, ro_busy, ro_done;
  logic [15:0] ro_count;

  always #10ns clk = ~clk;   // 50 MHz

  lbist_teg_top dut (.*);

  b22_scan_model #(.N_CHAINS(NC), .L_MAX(L)) cut (
    .clk, .se, .scan_in, .ff1(scan_ff1), .ff2(scan_ff2), .scan_out
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int n_to_1 = 0, n_to_3 = 0, swaps = 0, moves = 0, wraps = 0, n2_bits = 0;
  int captures = 0, compactions = 0, filtered = 0, ro_meas = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference pieces ----------------
  function automatic plpf_ctrl_t exp_ctrl(approach_e ap, int a, int b, plpf_ctrl_t ext,
                                          int r, int c, int k);
    int lo;
    if (ap == APP_EXTERNAL) return ext;
    case (ap)
      APP_SWAP:   lo = (((c + 1) % 2) == ((r + 1) % 2)) ? a : L - a - b;
      APP_MOVING: begin
        lo = a;
        for (int i = 0; i < r; i++) lo = (lo == 0) ? L - b : lo - 1;
      end
      default:    lo = a;
    endcase
    return (k >= lo && k < lo + b) ? CTRL_N1 : CTRL_N3;
  endfunction

  // filter: the active bits are T_j and the future bits not gated off
  function automatic bit ref_filter(plpf_ctrl_t cv, bit t0, bit t1, bit t2, bit past);
    bit all1, all0;
    all1 = t0; all0 = !t0;
    if (!cv[0]) begin all1 &= t1; all0 &= !t1; end
    if (!cv[1]) begin all1 &= t2; all0 &= !t2; end
    return all1 ? 1'b1 : (all0 ? 1'b0 : past);
  endfunction

  function automatic logic [10:0] ref_misr(logic [10:0] s, logic [NC-1:0] x);
    logic [10:0] n;
    n[0] = s[10] ^ s[8] ^ s[7];
    for (int i = 1; i < 11; i++) n[i] = s[i-1];
    for (int j = 0; j < NC; j++) n[j % 11] ^= x[j];
    return n;
  endfunction

  // WTM (%) predicted for one pattern with the n=1 window at lo .. lo+b-1
  function automatic real wtm_formula(int lo, int b);
    real num, den;
    num = 0.0; den = 0.0;
    for (int i = 1; i <= L; i++) begin
      den += i;
      num += i * ((i > lo && i <= lo + b) ? 0.5 : 0.0714);
    end
    return 100.0 * num / den;
  endfunction

  // ---------------- per-session records ----------------
  bit        rec_t   [NC][MAXS];
  bit        rec_in  [NC][MAXS];
  bit        rec_ff1 [NC][MAXS];
  plpf_ctrl_t rec_ctl[NC][MAXS];

  task automatic run_session(input approach_e ap, input int a, input int b,
                             input plpf_ctrl_t ext, output real wtm_meas,
                             output real wtm_pred);
    logic [10:0] msig;
    int s, nwtm;
    real wsum, psum;
    approach = ap; alpha = 7'(a); beta = 7'(b); ext_ctrl = ext;
    num_patterns = 16'(ROUNDS);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    msig = '0;
    s = 0;
    for (int r = 0; r < ROUNDS; r++) begin
      // capture slot
      check(busy && !se, $sformatf("round %0d: capture slot", r));
      if (busy && !se) captures++;
      @(negedge clk);
      for (int k = L - 1; k >= 0; k--) begin
        check(se, $sformatf("round %0d position %0d: scan enable", r, k));
        for (int c = 0; c < NC; c++) begin
          rec_t[c][s]   = dut.t[c][0];
          rec_in[c][s]  = scan_in[c];
          rec_ff1[c][s] = scan_ff1[c];
          rec_ctl[c][s] = exp_ctrl(ap, a, b, ext, r, c, k);
        end
        if (r > 0) begin
          msig = ref_misr(msig, scan_out);
          compactions++;
        end
        s++;
        @(negedge clk);
      end
    end
    check(done && !busy, "done after the last round");
    check(signature == msig, $sformatf("signature %h, reference %h", signature, msig));
    // filter check, clock by clock (the last two lack their future bits)
    for (int c = 0; c < NC; c++) begin
      for (int i = 0; i < MAXS - 2; i++) begin
        bit e;
        e = ref_filter(rec_ctl[c][i], rec_t[c][i], rec_t[c][i+1], rec_t[c][i+2], rec_ff1[c][i]);
        if (rec_in[c][i] != e || i % 97 == 0)
          check(rec_in[c][i] == e, $sformatf("chain %0d shift %0d ctrl %b: scan-in %b, expected %b",
                                             c, i, rec_ctl[c][i], rec_in[c][i], e));
        if (rec_in[c][i] != rec_t[c][i]) filtered++;
        if (rec_ctl[c][i] == CTRL_N2) n2_bits++;
        if (i > 0 && (i % L) != 0) begin
          if (rec_ctl[c][i-1] == CTRL_N3 && rec_ctl[c][i] == CTRL_N1) n_to_1++;
          if (rec_ctl[c][i-1] == CTRL_N1 && rec_ctl[c][i] == CTRL_N3) n_to_3++;
        end
      end
    end
    // where the n=1 window sat, vector by vector, as seen in the checked
    // control words: a changed start is a swap (Swap) or a move or
    // wrap-around (Moving)
    if (ap == APP_SWAP || ap == APP_MOVING) begin
      for (int c = 0; c < NC; c++) begin
        int prev_lo;
        prev_lo = -1;
        for (int r = 0; r < ROUNDS; r++) begin
          int lo;
          lo = -1;
          for (int k = 0; k < L; k++)
            if (lo < 0 && rec_ctl[c][r*L + (L-1-k)] == CTRL_N1) lo = k;
          if (r > 0 && ap == APP_SWAP && lo != prev_lo) swaps++;
          if (r > 0 && ap == APP_MOVING && c == 0 && lo == prev_lo - 1) moves++;
          if (r > 0 && ap == APP_MOVING && c == 0 && lo > prev_lo) wraps++;
          prev_lo = lo;
        end
      end
    end
    // WTM of the scan-in patterns after the warm-up vectors
    wsum = 0.0; psum = 0.0; nwtm = 0;
    for (int r = WARM; r < ROUNDS; r++) begin
      int lo;
      lo = -1;
      for (int k = 0; k < L; k++)
        if (lo < 0 && exp_ctrl(ap, a, b, ext, r, 0, k) == CTRL_N1) lo = k;
      for (int c = 0; c < NC; c++) begin
        real w;
        int clo, cb;
        w = 0.0;
        // bit at position k was shifted at index r*L + (L-1-k)
        for (int k = 0; k < L; k++) begin
          bit cur, older;
          cur   = rec_in[c][r*L + (L-1-k)];
          older = (k == L - 1) ? rec_ff1[c][r*L] : rec_in[c][r*L + (L-2-k)];
          if (cur != older) w += (k + 1);
        end
        wsum += 100.0 * w / (L * (L + 1) / 2);
        // prediction for this chain and vector
        cb = 0; clo = 0;
        for (int k = L - 1; k >= 0; k--)
          if (exp_ctrl(ap, a, b, ext, r, c, k) == CTRL_N1) begin cb++; clo = k; end
        if (ap == APP_EXTERNAL && ext == CTRL_N2) psum += 100.0 / 6.0;
        else psum += wtm_formula(clo, cb);
        nwtm++;
      end
    end
    wtm_meas = wsum / nwtm;
    wtm_pred = psum / nwtm;
    @(negedge clk);
  endtask

  // ---------------- stimulus ----------------
  int   tab_a[7]   = '{83, 35, 34, 29, 24, 19, 0};
  int   tab_b[7]   = '{0, 12, 15, 25, 35, 44, 83};
  real  basic_w[7];
  real  basic_p[7];

  function automatic bit near(real meas, real pred);
    return meas > 0.88 * pred && meas < 1.12 * pred;
  endfunction

  function automatic real correlation();
    real mx, my, sxy, sxx, syy;
    mx = 0; my = 0;
    for (int i = 0; i < 7; i++) begin mx += basic_p[i] / 7; my += basic_w[i] / 7; end
    sxy = 0; sxx = 0; syy = 0;
    for (int i = 0; i < 7; i++) begin
      sxy += (basic_p[i] - mx) * (basic_w[i] - my);
      sxx += (basic_p[i] - mx) ** 2;
      syy += (basic_w[i] - my) ** 2;
    end
    return sxy / $sqrt(sxx * syy);
  endfunction

  initial begin
    real wm, wp;
    approach = APP_BASIC; ext_ctrl = CTRL_N3; alpha = '0; beta = '0;
    num_patterns = '0; ro_en = '0; ro_sel = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Basic approach, the chip's seven switch timings
    for (int i = 0; i < 7; i++) begin
      run_session(APP_BASIC, tab_a[i], tab_b[i], CTRL_N3, wm, wp);
      basic_w[i] = wm;
      $display("INFO basic (%0d,%0d,%0d): WTM %.2f %% predicted %.2f %%",
               tab_a[i], tab_b[i], L - tab_a[i] - tab_b[i], wm, wp);
      basic_p[i] = wp;
      check(near(wm, wp), $sformatf("basic WTM %.2f vs %.2f", wm, wp));
      if (i > 0) check(basic_w[i] > basic_w[i-1], "WTM grows with the target");
    end

    $display("INFO basic: correlation of measured and predicted WTM %.4f", correlation());
    check(correlation() > 0.99, "measured WTM tracks the formula");

    // Swap approach, (L/2-i, i, L/2) with i = 19
    run_session(APP_SWAP, 22, 19, CTRL_N3, wm, wp);
    $display("INFO swap (22,19,42): WTM %.2f %% predicted %.2f %%", wm, wp);
    check(near(wm, wp), $sformatf("swap WTM %.2f vs %.2f", wm, wp));
    check(swaps == (ROUNDS - 1) * NC, $sformatf("every chain swapped every vector (%0d)", swaps));

    // Moving approach: window of 19 starting at alpha = 10, wraps at vector 11
    run_session(APP_MOVING, 10, 19, CTRL_N3, wm, wp);
    $display("INFO moving (10,19,54): WTM %.2f %% predicted %.2f %%", wm, wp);
    check(near(wm, wp), $sformatf("moving WTM %.2f vs %.2f", wm, wp));
    check(moves == ROUNDS - 2 && wraps == 1, $sformatf("moves %0d wraps %0d", moves, wraps));
    check(dut.moving_alpha == 7'(10), "moving controller rewinds when idle");

    // external control: n=2 everywhere, then n=1 everywhere
    run_session(APP_EXTERNAL, 0, 0, CTRL_N2, wm, wp);
    $display("INFO external n=2: WTM %.2f %% predicted %.2f %%", wm, wp);
    check(near(wm, wp), $sformatf("n=2 WTM %.2f vs %.2f", wm, wp));
    run_session(APP_EXTERNAL, 0, 0, CTRL_N1, wm, wp);
    $display("INFO external n=1: WTM %.2f %%", wm);
    check(near(wm, 50.0), $sformatf("n=1 WTM %.2f", wm));

    // ring oscillators, 2048-clock window each
    ro_en = 3'b111;
    for (int i = 0; i < 3; i++) begin
      real stage, expc;
      stage = (i == 0) ? 34.1 : (i == 1) ? 50.3 : 71.0;
      expc  = 2048.0 * 20000.0 / (2.0 * 51 * stage);
      ro_sel = 2'(i);
      @(negedge clk) ro_start = 1'b1;
      @(negedge clk) ro_start = 1'b0;
      while (!ro_done) @(negedge clk);
      $display("INFO RO%0d: %0d cycles in 2048 clocks = %.2f MHz", i + 1, ro_count,
               ro_count / 40.96);
      check(ro_count >= int'(expc) - 3 && ro_count <= int'(expc) + 3,
            $sformatf("RO%0d count %0d expected %.1f", i + 1, ro_count, expc));
      ro_meas++;
    end

    $display("INFO mechanisms: n3->n1 %0d, n1->n3 %0d, swaps %0d, moves %0d, wraps %0d, n=2 bits %0d, captures %0d, compactions %0d, filtered bits %0d, RO %0d",
             n_to_1, n_to_3, swaps, moves, wraps, n2_bits, captures, compactions, filtered, ro_meas);
    check(n_to_1 > 0, "window opened");
    check(n_to_3 > 0, "window closed");
    check(swaps > 0, "swap happened");
    check(moves > 0, "moving window moved");
    check(wraps > 0, "moving window wrapped");
    check(n2_bits > 0, "n=2 filtering used");
    check(captures > 0, "capture happened");
    check(compactions > 0, "MISR compacted");
    check(filtered > 0, "PLPF changed bits");
    check(ro_meas == 3, "all ring oscillators measured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
