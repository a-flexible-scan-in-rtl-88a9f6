// plpf_opt_tb -- self-checking testbench for plpf_opt (n=2 and n=3).
//
// 1. Exhaustive truth table against the rule stated for the filter: the
//    scan-in bit changes only when the current bit and all future bits are
//    equal and differ from the past bit; otherwise it repeats the past bit.
// 2. For n=2 the function must equal the 3-input majority.
// 3. Toggle rate: a long random stream is filtered with the output fed back
//    as the past bit, as the first scan flip-flop does; the rate must be
//    near 1/(2^(n+1)-2): 16.67 % for n=2, 7.14 % for n=3.
module plpf_opt_tb;
  logic [1:0] t2;
  logic [2:0] t3;
  logic       sp2, sp3, s2, s3;
  int checks = 0, failures = 0;

  plpf_opt #(.N(2)) dut2 (.t(t2), .s_prev(sp2), .s(s2));
  plpf_opt #(.N(3)) dut3 (.t(t3), .s_prev(sp3), .s(s3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic bit rule(input logic [2:0] tv, input int n, input bit past);
    bit all1, all0;
    all1 = 1; all0 = 1;
    for (int k = 0; k < n; k++) begin
      if (tv[k]) all0 = 0; else all1 = 0;
    end
    if (all1) return 1'b1;
    if (all0) return 1'b0;
    return past;
  endfunction

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive
    for (int v = 0; v < 16; v++) begin
      {sp3, t3} = 4'(v);
      {sp2, t2} = 3'(v & 7);
      #1;
      check(s3 == rule(t3, 3, sp3), $sformatf("n=3 t=%b past=%b", t3, sp3));
      if (v < 8) begin
        check(s2 == rule({1'b0, t2}, 2, sp2), $sformatf("n=2 t=%b past=%b", t2, sp2));
        check(s2 == ((t2[0] & t2[1]) | (t2[0] & sp2) | (t2[1] & sp2)),
              $sformatf("n=2 majority t=%b past=%b", t2, sp2));
      end
    end
    // toggle rate of a filtered random stream
    begin
      localparam int NB = 200000;
      bit b0, b1, b2;
      int tog2, tog3;
      real r2, r3;
      b0 = 1'($urandom); b1 = 1'($urandom); b2 = 1'($urandom);
      sp2 = 1'b0; sp3 = 1'b0;
      tog2 = 0; tog3 = 0;
      for (int i = 0; i < NB; i++) begin
        t2 = {b1, b0};
        t3 = {b2, b1, b0};
        #1;
        if (s2 != sp2) tog2++;
        if (s3 != sp3) tog3++;
        sp2 = s2; sp3 = s3;
        b0 = b1; b1 = b2; b2 = 1'($urandom);
      end
      r2 = 100.0 * tog2 / NB;
      r3 = 100.0 * tog3 / NB;
      $display("toggle rate n=2 %.2f %%  n=3 %.2f %%", r2, r3);
      check(r2 > 16.17 && r2 < 17.17, $sformatf("n=2 toggle rate %.2f", r2));
      check(r3 > 6.84 && r3 < 7.44, $sformatf("n=3 toggle rate %.2f", r3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
