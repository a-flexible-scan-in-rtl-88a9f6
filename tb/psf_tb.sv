// psf_tb -- self-checking testbench for psf.
//
// Drives the phase shifter from the test-chip LFSR (90 chains) and checks
// the property the PLPFs rely on: the future bit T_j+k seen by a chain now
// is the current bit T_j that chain sees k shift clocks later. It also
// checks that no two chains receive the same stream (distinct phases) and
// that every stream is balanced (about half ones).
module psf_tb;
  import lbist_pkg::*;

  localparam int unsigned NC = TEG_CHAINS;
  localparam int unsigned NT   = 400;
  localparam int unsigned WARM = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [21:0] q;
  logic [NC-1:0][2:0] t;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  lfsr u_lfsr (.clk, .rst_n, .init(1'b0), .en(1'b1), .q);
  psf  dut (.lfsr_q(q), .t);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [NT-1:0]  cur [NC];
  logic [NT-1:0]  fut1[NC];
  logic [NT-1:0]  fut2[NC];

  initial begin : watchdog
    repeat (WARM + NT + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // an all-ones seed in a trinomial LFSR gives a long run of ones first:
    // skip it before judging the balance
    repeat (WARM) @(posedge clk);
    #1;
    for (int s = 0; s < NT; s++) begin
      #5;
      for (int c = 0; c < NC; c++) begin
        cur[c][s]  = t[c][0];
        fut1[c][s] = t[c][1];
        fut2[c][s] = t[c][2];
      end
      @(posedge clk); #1;
    end
    for (int c = 0; c < NC; c++) begin
      bit ok1, ok2;
      ok1 = 1; ok2 = 1;
      for (int s = 0; s < NT - 2; s++) begin
        if (fut1[c][s] != cur[c][s+1]) ok1 = 0;
        if (fut2[c][s] != cur[c][s+2]) ok2 = 0;
      end
      check(ok1, $sformatf("chain %0d: T_j+1 is not the next T_j", c));
      check(ok2, $sformatf("chain %0d: T_j+2 is not the T_j two clocks on", c));
      check($countones(cur[c]) > NT * 4 / 10 && $countones(cur[c]) < NT * 6 / 10,
            $sformatf("chain %0d: unbalanced stream (%0d ones)", c, $countones(cur[c])));
      for (int d = 0; d < c; d++)
        check(cur[c] != cur[d], $sformatf("chains %0d and %0d share a stream", c, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
