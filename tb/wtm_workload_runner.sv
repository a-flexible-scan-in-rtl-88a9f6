// wtm_workload_runner -- runs one benchmark configuration of the switch-
// timing study through lbist_teg_top and measures the weighted transition
// metric (WTM) of the scan-in patterns it produces.
//
// The top is built with the simulation-study generator (16-bit LFSR
// x^16+x^15+x^13+x^4+1 seeded with 1010..10) and with N_CHAINS chains of
// length L, driving a b22_scan_model as circuit under test. Three sessions
// of NPAT vectors are run: Basic with (B_A, B_B), Swap with (S_A, S_B) and
// Moving with (S_A, S_B), which share one timing; then two sessions with
// the fixed n=2 and n=3 filters from the control pins, whose targets are
// the filters' theoretical toggle rates 16.67 % and 7.14 %. STYLE picks the
// AND/OR or the majority filter circuit. During every shift clock
// the scan-in bit of each chain is compared with the chain's first flip-flop
// (the bit shifted in one clock before, or the captured value for the first
// shift); a difference at final position k (count k) weighs k+1. The WTM of
// a session is the sum of these weights over all chains and vectors after
// the first, divided by L(L+1)/2 per chain and vector.
//
// Checks per session: the session takes exactly NPAT+1 rounds of L+1
// clocks (plus one clock to done), the measured WTM lies within TOL percentage points of the target
// target, and a non-zero signature is produced. Results are reported through
// the checks/failures outputs when `finished` rises.
module wtm_workload_runner
  import lbist_pkg::*;
#(
  parameter string       NAME   = "b22",
  parameter int unsigned NC     = 9,
  parameter int unsigned L      = 82,
  parameter int unsigned NPAT   = 2000,
  parameter real         WTM_RQ = 13.12,
  parameter int unsigned B_A    = 39,
  parameter int unsigned B_B    = 13,
  parameter int unsigned S_A    = 46,
  parameter int unsigned S_B    = 13,
  parameter real         TOL    = 1.0,
  parameter plpf_style_e STYLE  = PLPF_OPT,
  localparam int unsigned CW    = $clog2(L + 1)
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  logic          start;
  logic [15:0]   num_patterns;
  approach_e     approach;
  plpf_ctrl_t    ext_ctrl;
  logic [CW-1:0] alpha, beta;
  logic          busy, done, se;
  logic [10:0]   signature;
  logic [NC-1:0] scan_in, scan_ff1, scan_ff2, scan_out;
  logic [2:0]    ro_en;
  logic [1:0]    ro_sel;
  logic          ro_start, ro_busy, ro_done;
  logic [15:0]   ro_count;

  lbist_teg_top #(
    .N_CHAINS (NC),
    .L        (L),
    .LFSR_W   (SIM_LFSR_W),
    .LFSR_POLY(SIM_LFSR_POLY),
    .LFSR_SEED(SIM_LFSR_SEED),
    .PLPF_STYLE(STYLE),
    .RO_WINDOW(64)
  ) dut (.*);

  b22_scan_model #(.N_CHAINS(NC), .L_MAX(L)) cut (
    .clk, .se, .scan_in, .ff1(scan_ff1), .ff2(scan_ff2), .scan_out
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %s", NAME, what);
    end
  endtask

  // weighted transitions of the scan-in, accumulated while a session runs
  real wsum;
  always @(negedge clk) begin
    if (se && dut.round_idx != 0)
      for (int c = 0; c < NC; c++)
        if (scan_in[c] != scan_ff1[c]) wsum += real'(dut.cnt) + 1.0;
  end

  task automatic run(input approach_e ap, input int a, input int b, input plpf_ctrl_t ext,
                     input real target, input string tag);
    int  cycles;
    real wtm;
    approach = ap; alpha = CW'(a); beta = CW'(b); ext_ctrl = ext;
    num_patterns = 16'(NPAT + 1);
    wsum = 0.0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    // done follows the last shift by one clock
    check(cycles == (NPAT + 1) * (L + 1) + 1,
          $sformatf("%s: session took %0d clocks, expected %0d", tag, cycles,
                    (NPAT + 1) * (L + 1) + 1));
    check(signature != '0, $sformatf("%s: signature is zero", tag));
    wtm = 100.0 * wsum / (real'(NC) * real'(NPAT) * real'(L * (L + 1) / 2));
    $display("INFO %s %s (%0d,%0d,%0d): WTM_in %.2f %%, target %.2f %%",
             NAME, tag, a, b, L - a - b, wtm, target);
    check(wtm > target - TOL && wtm < target + TOL,
          $sformatf("%s: WTM %.2f outside %.2f +- %.2f", tag, wtm, target, TOL));
    @(negedge clk);
  endtask

  initial begin
    finished = 1'b0; checks = 0; failures = 0;
    start = 1'b0; num_patterns = '0; approach = APP_BASIC; ext_ctrl = CTRL_N3;
    alpha = '0; beta = '0; ro_en = '0; ro_sel = '0; ro_start = 1'b0;
    wsum = 0.0;
    @(posedge rst_n);
    repeat (2) @(negedge clk);
    run(APP_BASIC,    B_A, B_B, CTRL_N3, WTM_RQ, "basic");
    run(APP_SWAP,     S_A, S_B, CTRL_N3, WTM_RQ, "swap");
    run(APP_MOVING,   S_A, S_B, CTRL_N3, WTM_RQ, "moving");
    // the single filters on their own (n=2: 1/6, n=3: 1/14 of all shifts
    // toggle, which is also their WTM)
    run(APP_EXTERNAL, 0, 0, CTRL_N2, 100.0 / 6.0,  "fixed n=2");
    run(APP_EXTERNAL, 0, 0, CTRL_N3, 100.0 / 14.0, "fixed n=3");
    finished = 1'b1;
  end

endmodule
