// dyn_plpf_opt_tb -- self-checking testbench for dyn_plpf_opt.
//
// Exhaustive over the three phase-shifter bits, the past bit and the four
// control words. The reference states the filter in terms of the active
// inputs: the current bit is always active, T_j+1 is active when ctrl[0]
// is 0 and T_j+2 when ctrl[1] is 0; the output takes the common value of
// the active bits when they all agree and repeats the past bit otherwise.
// Then the toggle rate of a random stream is measured for "11" (50 %),
// "10" (16.67 %) and "00" (7.14 %).
module dyn_plpf_opt_tb;
  import lbist_pkg::*;
  logic [2:0]  t;
  logic        sp, s;
  plpf_ctrl_t  ctrl;
  int checks = 0, failures = 0;

  dyn_plpf_opt dut (.t, .s_prev(sp), .ctrl, .s);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic bit ref_s(input logic [2:0] tv, input logic [1:0] cv, input bit past);
    bit all1, all0;
    all1 = tv[0]; all0 = !tv[0];
    if (!cv[0]) begin all1 &= tv[1]; all0 &= !tv[1]; end
    if (!cv[1]) begin all1 &= tv[2]; all0 &= !tv[2]; end
    return all1 ? 1'b1 : (all0 ? 1'b0 : past);
  endfunction


  initial begin : watchdog
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {ctrl, sp, t} = 6'(v);
      #1;
      check(s == ref_s(t, ctrl, sp), $sformatf("ctrl=%b past=%b t=%b", ctrl, sp, t));
    end
    check(CTRL_N1 == 2'b11 && CTRL_N3 == 2'b00, "control codes");
    // toggle rates measured on the DUT itself
    foreach (expected_rate[i]) begin
      localparam int NB = 100000;
      bit b0, b1, b2;
      int tog;
      real r;
      ctrl = rate_ctrl[i];
      b0 = 1'($urandom); b1 = 1'($urandom); b2 = 1'($urandom);
      sp = 1'b0; tog = 0;
      for (int k = 0; k < NB; k++) begin
        t = {b2, b1, b0};
        #1;
        if (s != sp) tog++;
        sp = s;
        b0 = b1; b1 = b2; b2 = 1'($urandom);
      end
      r = 100.0 * tog / NB;
      $display("INFO ctrl=%b toggle rate %.2f %%", ctrl, r);
      check(r > expected_rate[i] - 0.6 && r < expected_rate[i] + 0.6,
            $sformatf("ctrl=%b toggle rate %.2f", ctrl, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real        expected_rate[3] = '{50.0, 16.67, 7.14};
  plpf_ctrl_t rate_ctrl[3]     = '{2'b11, 2'b10, 2'b00};
endmodule
