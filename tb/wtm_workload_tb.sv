// wtm_workload_tb -- the switch-timing study on five benchmark
// configurations, run side by side through lbist_teg_top built with the
// 16-bit simulation-study LFSR. Chain counts and lengths, target WTMs and
// switch timings (alpha, beta) for Basic and for Swap/Moving are those
// published for the circuits:
//
//   circuit  chains x length  WTM_rq   Basic (a,b)  Swap/Moving (a,b)
//   s9234     3 x  76         17.81    (28,19)      (38,19)
//   s13207    7 x  96         26.32    (26,43)      (14,43)
//   s38417    9 x 182         17.63    (69,44)      (91,44)
//   b14       3 x  82         13.14    (35,11)      (41,11)
//   b22       9 x  92 (*)     13.12    (39,13)      (46,13)
//
// (*) b22 has chains of at most 82 flip-flops, but its published timings
// add up to alpha+beta+gamma = 92, and only at L=92 do they give the 13.12 %
// target (at L=82 the same alpha and beta give about 14.7 %). The row is
// therefore run at L=92, the length its numbers describe.
//
// Each configuration runs NPAT vectors per approach (fewer than the 30,000
// of the study, to bound simulation time) in a wtm_workload_runner, then the
// fixed n=2 and n=3 filters alone; s9234 is run a second time with the
// majority filter circuit. The runner checks the session length and that
// the measured scan-in WTM is within
// 0.75 percentage points of the target (1.5 for the majority circuit).
// The majority filter for n=3 also reads S_j-2. At the start of each
// pattern both S_j-1 and S_j-2 hold captured values, which this stand-in
// circuit makes nearly random. A disagreeing pair makes the first outputs
// toggle more often, and those positions carry the highest weight (about L
// each). The majority runs therefore measure about one point higher. With
// the first three shifts of each pattern left out, the two circuits agree
// to within half a point. The circuit under test is the
// behavioural b22_scan_model in every case.
module wtm_workload_tb;

  localparam int NPAT = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10ns clk = ~clk;

  logic fin[6];
  int   chk[6], fl[6];

  wtm_workload_runner #(.NAME("s9234"),  .NC(3), .L(76),  .NPAT(NPAT), .WTM_RQ(17.81),
                        .B_A(28), .B_B(19), .S_A(38), .S_B(19), .TOL(0.75))
    r0 (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  wtm_workload_runner #(.NAME("s13207"), .NC(7), .L(96),  .NPAT(NPAT), .WTM_RQ(26.32),
                        .B_A(26), .B_B(43), .S_A(14), .S_B(43), .TOL(0.75))
    r1 (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  wtm_workload_runner #(.NAME("s38417"), .NC(9), .L(182), .NPAT(NPAT), .WTM_RQ(17.63),
                        .B_A(69), .B_B(44), .S_A(91), .S_B(44), .TOL(0.75))
    r2 (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fl[2]));
  wtm_workload_runner #(.NAME("b14"),    .NC(3), .L(82),  .NPAT(NPAT), .WTM_RQ(13.14),
                        .B_A(35), .B_B(11), .S_A(41), .S_B(11), .TOL(0.75))
    r4 (.clk, .rst_n, .finished(fin[4]), .checks(chk[4]), .failures(fl[4]));
  wtm_workload_runner #(.NAME("b22"),    .NC(9), .L(92),  .NPAT(NPAT), .WTM_RQ(13.12),
                        .B_A(39), .B_B(13), .S_A(46), .S_B(13), .TOL(0.75))
    r3 (.clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fl[3]));

  // s9234 once more with the majority filters (the chip's circuit); see the
  // note above for the wider tolerance
  wtm_workload_runner #(.NAME("s9234/majority"), .NC(3), .L(76), .NPAT(NPAT), .WTM_RQ(17.81),
                        .B_A(28), .B_B(19), .S_A(38), .S_B(19), .TOL(1.5),
                        .STYLE(lbist_pkg::PLPF_ORIG))
    r5 (.clk, .rst_n, .finished(fin[5]), .checks(chk[5]), .failures(fl[5]));

  int checks = 0, failures = 0;

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < 6; i++) begin
      checks   += chk[i];
      failures += fl[i];
    end
  endtask

  initial begin : watchdog
    // longest runner: 5 sessions of (NPAT+1) rounds of 183 clocks
    repeat (5 * (NPAT + 2) * 183 + 1000) @(posedge clk);
    report();
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
