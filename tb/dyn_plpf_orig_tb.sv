// dyn_plpf_orig_tb -- self-checking testbench for dyn_plpf_orig.
//
// Exhaustive over T_j..T_j+2, the two past bits and the four control
// words. Reference: "11" passes T_j; "00" is the majority of all five
// bits; the other two codes give the majority of T_j, T_j+1 and S_j-1.
module dyn_plpf_orig_tb;
  import lbist_pkg::*;
  logic [2:0]  t;
  logic [1:0]  sp;
  logic        s;
  plpf_ctrl_t  ctrl;
  int checks = 0, failures = 0;
  int n1 = 0, n2 = 0, n3 = 0;

  dyn_plpf_orig dut (.t, .s_past(sp), .ctrl, .s);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      bit exp_s;
      int five, three;
      {ctrl, sp, t} = 7'(v);
      #1;
      five  = int'(t[0]) + int'(t[1]) + int'(t[2]) + int'(sp[0]) + int'(sp[1]);
      three = int'(t[0]) + int'(t[1]) + int'(sp[0]);
      if (ctrl == 2'b11)      begin exp_s = t[0];        n1++; end
      else if (ctrl == 2'b00) begin exp_s = (five >= 3); n3++; end
      else                    begin exp_s = (three >= 2); n2++; end
      check(s == exp_s, $sformatf("ctrl=%b past=%b t=%b", ctrl, sp, t));
    end
    check(n1 == 32 && n2 == 64 && n3 == 32, "all three filters selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
