// lfsr_tb -- self-checking testbench for lfsr.
//
// Runs the test-chip 22-bit LFSR (x^22 + x^21 + 1, seed all ones) and the
// 16-bit study LFSR (x^16 + x^15 + x^13 + x^4 + 1, seed 1010..10) against a
// reference written as a bit-serial recurrence: the sequence leaving the
// last stage obeys b[t] = XOR of b[t - W + k] over the polynomial terms x^k.
// It also checks the init reload, the hold when en is low, and that the
// 16-bit register returns to its seed after exactly 2^16 - 1 steps
// (maximal length).
module lfsr_tb;
  import lbist_pkg::*;

  logic clk = 1'b0;
  logic rst_n, init, en;
  logic [21:0] q22;
  logic [15:0] q16;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr dut22 (.clk, .rst_n, .init, .en, .q(q22));
  lfsr #(.W(16), .POLY(SIM_LFSR_POLY), .SEED(SIM_LFSR_SEED)) dut16
       (.clk, .rst_n, .init, .en, .q(q16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference: history of the bit that sits in the last stage.
  bit hist22[$];
  bit hist16[$];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [21:0] s22;
    logic [15:0] s16;
    int period;
    rst_n = 1'b0; init = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(q22 == '1, "22-bit reset seed");
    check(q16 == 16'hAAAA, "16-bit reset seed");
    // initial history: stage W holds the oldest bit, stage 1 the newest
    for (int k = 21; k >= 0; k--) hist22.push_back(q22[k]);
    for (int k = 15; k >= 0; k--) hist16.push_back(q16[k]);
    en = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      bit nb22, nb16;
      int n22, n16;
      @(posedge clk); #1;
      n22 = hist22.size();
      n16 = hist16.size();
      // x^22 + x^21 + 1: new bit = b[n-22] ^ b[n-21]
      nb22 = hist22[n22-22] ^ hist22[n22-21];
      // x^16 + x^15 + x^13 + x^4 + 1
      nb16 = hist16[n16-16] ^ hist16[n16-15] ^ hist16[n16-13] ^ hist16[n16-4];
      hist22.push_back(nb22);
      hist16.push_back(nb16);
      for (int k = 0; k < 22; k++) s22[k] = hist22[hist22.size()-1-k];
      for (int k = 0; k < 16; k++) s16[k] = hist16[hist16.size()-1-k];
      check(q22 == s22, $sformatf("22-bit state at step %0d", t));
      check(q16 == s16, $sformatf("16-bit state at step %0d", t));
    end
    // hold
    en = 1'b0;
    s22 = q22;
    repeat (3) @(posedge clk);
    #1 check(q22 == s22, "hold when en=0");
    // init reload
    init = 1'b1; en = 1'b1;
    @(posedge clk); #1 init = 1'b0;
    check(q22 == '1 && q16 == 16'hAAAA, "init reloads the seeds");
    // maximal length of the 16-bit register
    period = 0;
    do begin
      @(posedge clk); #1 period++;
    end while (q16 != 16'hAAAA && period < 70000);
    check(period == 65535, $sformatf("16-bit period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
