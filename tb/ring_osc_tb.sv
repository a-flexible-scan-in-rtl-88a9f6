// ring_osc_tb -- self-checking testbench for the ring_osc model.
//
// Measures the period of the three ring configurations of the test chip
// (51 stages of 34.1, 50.3 and 71.0 ps) from rising edge to rising edge and
// compares it with 2 * 51 * stage delay, i.e. about 287.5, 194.9 and
// 138.1 MHz. Checks that the output stays low while disabled and that
// oscillation resumes when re-enabled.
module ring_osc_tb;
  logic [2:0] en = '0;
  logic [2:0] osc;
  int checks = 0, failures = 0;
  real stage_ps[3] = '{34.1, 50.3, 71.0};

  ring_osc #(.STAGE_DELAY_PS(34.1)) ro1 (.en(en[0]), .osc(osc[0]));
  ring_osc #(.STAGE_DELAY_PS(50.3)) ro2 (.en(en[1]), .osc(osc[1]));
  ring_osc #(.STAGE_DELAY_PS(71.0)) ro3 (.en(en[2]), .osc(osc[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int i);
    realtime t0, t1;
    real per_ps, exp_ps;
    @(posedge osc[i]) t0 = $realtime;
    repeat (10) @(posedge osc[i]);
    t1 = $realtime;
    per_ps = (t1 - t0) * 1000.0 / 10.0;    // time unit is 1 ns
    exp_ps = 2.0 * 51 * stage_ps[i];
    $display("INFO RO%0d period %.1f ps (%.2f MHz)", i + 1, per_ps, 1.0e6 / per_ps);
    check(per_ps > exp_ps - 2.0 && per_ps < exp_ps + 2.0,
          $sformatf("RO%0d period %.1f ps, expected %.1f", i + 1, per_ps, exp_ps));
  endtask

  initial begin
    #20ns;
    check(osc == 3'b000, "all low while disabled");
    en = 3'b111;
    for (int i = 0; i < 3; i++) measure(i);
    en = 3'b000;
    #20ns;
    check(osc == 3'b000, "low after disable");
    #20ns;
    check(osc == 3'b000, "stays low");
    en = 3'b001;
    measure(0);
    check(osc[2:1] == 2'b00, "others still off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
