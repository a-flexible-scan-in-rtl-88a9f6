// plpf_orig_tb -- self-checking testbench for plpf_orig (n=2 and n=3).
//
// Exhaustive check against a majority vote counted bit by bit (3 inputs
// for n=2, 5 for n=3), then the toggle rate of a long random stream with
// the scan flip-flops modelled as a two-stage shift register fed by the
// filter output: near 16.67 % for n=2 and near 7.1-7.6 % for n=3 (the
// moving-average filter is not exactly the ideal 7.14 % one).
module plpf_orig_tb;
  logic [1:0] t2;
  logic [0:0] p2;
  logic [2:0] t3;
  logic [1:0] p3;
  logic       s2, s3;
  int checks = 0, failures = 0;

  plpf_orig #(.N(2)) dut2 (.t(t2), .s_past(p2), .s(s2));
  plpf_orig #(.N(3)) dut3 (.t(t3), .s_past(p3), .s(s3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int ones3, ones2;
      {p3, t3} = 5'(v);
      {p2, t2} = 3'(v & 7);
      #1;
      ones3 = 0;
      for (int k = 0; k < 5; k++) if (v[k]) ones3++;
      ones2 = 0;
      for (int k = 0; k < 3; k++) if (v[k]) ones2++;
      check(s3 == (ones3 >= 3), $sformatf("n=3 inputs %b", v[4:0]));
      if (v < 8) check(s2 == (ones2 >= 2), $sformatf("n=2 inputs %b", v[2:0]));
    end
    begin
      localparam int NB = 200000;
      bit b0, b1, b2;
      bit f2, f3a, f3b;
      int tog2, tog3;
      real r2, r3;
      b0 = 1'($urandom); b1 = 1'($urandom); b2 = 1'($urandom);
      f2 = 0; f3a = 0; f3b = 0;
      tog2 = 0; tog3 = 0;
      for (int i = 0; i < NB; i++) begin
        t2 = {b1, b0}; p2 = f2;
        t3 = {b2, b1, b0}; p3 = {f3b, f3a};
        #1;
        if (s2 != f2) tog2++;
        if (s3 != f3a) tog3++;
        f2 = s2;
        f3b = f3a; f3a = s3;
        b0 = b1; b1 = b2; b2 = 1'($urandom);
      end
      r2 = 100.0 * tog2 / NB;
      r3 = 100.0 * tog3 / NB;
      $display("toggle rate n=2 %.2f %%  n=3 %.2f %%", r2, r3);
      check(r2 > 16.17 && r2 < 17.17, $sformatf("n=2 toggle rate %.2f", r2));
      check(r3 > 6.8 && r3 < 7.9, $sformatf("n=3 toggle rate %.2f", r3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
