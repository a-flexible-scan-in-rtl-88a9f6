// plpf_ctrl_basic_tb -- self-checking testbench for plpf_ctrl_basic.
//
// The testbench plays the scan-shift counter itself (capture slot at L,
// then L-1 .. 0) and checks in every shift clock that the control word is
// "11" exactly for positions alpha .. alpha+beta-1 and "00" elsewhere. It
// uses the seven switch timings of the test-chip measurement (L = 83,
// from 83/0/0 to 0/83/0) over two vectors each, and the 4-bit counter
// example of the controller figure, switch points 3 and 10, at L = 15.
module plpf_ctrl_basic_tb;
  import lbist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, active = 1'b0;
  logic [6:0] cnt, alpha, beta;
  logic [3:0] cnt15, alpha15, beta15;
  plpf_ctrl_t ctrl, ctrl15;
  int checks = 0, failures = 0;
  int n1_total = 0;

  always #10 clk = ~clk;

  plpf_ctrl_basic dut (.clk, .rst_n, .active, .cnt, .alpha, .beta, .ctrl);
  plpf_ctrl_basic #(.L(15)) dut15 (.clk, .rst_n, .active, .cnt(cnt15),
                                   .alpha(alpha15), .beta(beta15), .ctrl(ctrl15));

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

  // one session of `vectors` rounds on both instances
  task automatic run(input int a, input int b, input int a15, input int b15, input int vectors);
    alpha = 7'(a); beta = 7'(b); alpha15 = 4'(a15); beta15 = 4'(b15);
    @(negedge clk) active = 1'b1;
    for (int v = 0; v < vectors; v++) begin
      int n1;
      n1 = 0;
      for (int k = 83; k >= 0; k--) begin
        cnt = 7'(k);
        cnt15 = 4'(k > 15 ? 15 : k);
        #1;
        if (k != 83) begin
          bit exp;
          exp = (k >= a) && (k < a + b);
          check(ctrl == (exp ? CTRL_N1 : CTRL_N3),
                $sformatf("(%0d,%0d) vector %0d position %0d ctrl %b", a, b, v, k, ctrl));
          if (ctrl == CTRL_N1) n1++;
        end
        if (k < 15) begin
          bit exp15;
          exp15 = (k >= a15) && (k < a15 + b15);
          check(ctrl15 == (exp15 ? CTRL_N1 : CTRL_N3),
                $sformatf("L=15 position %0d ctrl %b", k, ctrl15));
        end
        @(negedge clk);
      end
      check(n1 == b, $sformatf("(%0d,%0d): %0d n=1 bits", a, b, n1));
      n1_total += n1;
    end
    active = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    cnt = 7'd83; cnt15 = 4'd15; alpha = '0; beta = '0; alpha15 = '0; beta15 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(83, 0, 3, 7, 2);   // 7 %
    run(35, 12, 3, 7, 2);  // 10 %
    run(34, 15, 3, 7, 2);  // 15 %
    run(29, 25, 3, 7, 2);  // 20 %
    run(24, 35, 3, 7, 2);  // 25 %
    run(19, 44, 3, 7, 2);  // 30 %
    run(0, 83, 0, 15, 2);  // 50 %
    check(n1_total == 2 * (0 + 12 + 15 + 25 + 35 + 44 + 83), "total n=1 bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
