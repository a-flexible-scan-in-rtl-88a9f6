// ro_meter_tb -- self-checking testbench for ro_meter.
//
// A 50 MHz system clock and a test oscillator of known period drive the
// meter. With the chip's 2048-clock window (40.96 us) the count must equal
// 40.96 us / period within the +-2 cycles lost or gained at the
// synchroniser; this is checked for 3.478 ns (about RO1), 5.131 ns and
// 7.245 ns. A shorter window (64 clocks) checks that the count scales with
// the window and that `done` rises WINDOW + SETTLE + 1 clocks after the edge that
// samples start.
module ro_meter_tb;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, ro_clk = 1'b0;
  logic busy, done, busy64, done64;
  logic [15:0] count, count64;
  realtime half = 1.739ns;
  int checks = 0, failures = 0;

  always #10ns clk = ~clk;
  always #(half) ro_clk = ~ro_clk;

  ro_meter dut (.clk, .rst_n, .start, .ro_clk, .busy, .done, .count);
  ro_meter #(.WINDOW(64)) dut64 (.clk, .rst_n, .start, .ro_clk, .busy(busy64),
                                 .done(done64), .count(count64));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input realtime h);
    real expect_full, expect_64;
    int clocks, clocks64;
    half = h;
    repeat (4) @(negedge clk);
    start = 1'b1;
    @(negedge clk) start = 1'b0;
    clocks = 1; clocks64 = 0;
    check(busy && busy64, "busy after start");
    while (!done) begin
      @(negedge clk);
      clocks++;
      if (done64) begin
        clocks64 = clocks;
        expect_64 = 64 * 20.0 / (2.0 * h);
        check(count64 >= int'(expect_64) - 2 && count64 <= int'(expect_64) + 2,
              $sformatf("64-clock window count %0d, expected %.1f", count64, expect_64));
      end
    end
    expect_full = 2048 * 20.0 / (2.0 * h);
    $display("INFO period %.3f ns: count %0d, expected %.1f", 2.0 * h, count, expect_full);
    check(count >= int'(expect_full) - 2 && count <= int'(expect_full) + 2,
          $sformatf("count %0d, expected %.1f", count, expect_full));
    check(clocks == 2048 + 4 + 1, $sformatf("done after %0d clocks", clocks));
    check(clocks64 == 64 + 4 + 1, $sformatf("64-window done after %0d clocks", clocks64));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    measure(1.739ns);
    measure(2.5655ns);
    measure(3.6225ns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
