// plpf_ctrl_moving_tb -- self-checking testbench for plpf_ctrl_moving.
//
// Plays the scan-shift counter at L = 83 and the last-shift marker. For a
// window of beta bits the expected alpha of vector v (0-based) is the
// programmed alpha minus v, wrapping from 0 back to L - beta; the control
// word must be "11" exactly at positions alpha .. alpha+beta-1. Two
// sessions: beta = 19 starting at alpha = 3 (so the wrap happens within
// eight vectors) and the full published example (38, 19, 26) for 3
// vectors. Wrap-arounds and window moves are counted.
module plpf_ctrl_moving_tb;
  import lbist_pkg::*;
  localparam int L = 83;
  logic clk = 1'b0, rst_n = 1'b0, active = 1'b0, last_shift;
  logic [6:0] cnt, alpha, beta, cur_alpha;
  plpf_ctrl_t ctrl;
  int checks = 0, failures = 0, wraps = 0, moves = 0;

  always #10 clk = ~clk;

  plpf_ctrl_moving dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int a0, input int b, input int vectors);
    int a;
    alpha = 7'(a0); beta = 7'(b);
    a = a0;
    @(negedge clk) active = 1'b1;
    for (int v = 0; v < vectors; v++) begin
      for (int k = L; k >= 0; k--) begin
        cnt = 7'(k);
        last_shift = (k == 0);
        #1;
        if (k != L) begin
          bit exp;
          exp = (k >= a) && (k < a + b);
          check(ctrl == (exp ? CTRL_N1 : CTRL_N3),
                $sformatf("start %0d vector %0d alpha %0d position %0d", a0, v, a, k));
          if (k == 0) check(cur_alpha == 7'(a), "current alpha");
        end
        @(negedge clk);
      end
      if (a == 0) begin a = L - b; wraps++; end
      else begin a = a - 1; moves++; end
    end
    active = 1'b0; last_shift = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    cnt = 7'(L); alpha = '0; beta = '0; last_shift = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(3, 19, 8);
    run(38, 19, 3);
    check(wraps == 1 && moves == 10, $sformatf("wraps %0d moves %0d", wraps, moves));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
