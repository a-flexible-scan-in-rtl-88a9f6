// scan_shift_counter_tb -- self-checking testbench for scan_shift_counter.
//
// Runs sessions of 3 and 1 rounds at the chip's chain length L = 83 and
// checks, clock by clock, the count sequence (capture slot at L, then
// L-1 .. 0), scan enable, the unload-valid window (rounds 2 onward), the
// vector parity, the last-shift marker, and that `done` comes exactly
// rounds * (L+1) clocks after start. A start with zero rounds is ignored.
module scan_shift_counter_tb;
  localparam int L = 83;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [15:0] num_patterns;
  logic [6:0]  cnt;
  logic busy, se, capture, last_shift, unload_valid, vec_odd, done;
  logic [15:0] round_idx;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  scan_shift_counter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic session(input int rounds);
    int shifts, unloads;
    num_patterns = 16'(rounds);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    shifts = 0; unloads = 0;
    for (int r = 0; r < rounds; r++) begin
      for (int k = L; k >= 0; k--) begin
        check(busy, "busy during session");
        check(cnt == 7'(k), $sformatf("round %0d count %0d, expected %0d", r, cnt, k));
        check(se == (k != L), $sformatf("se at count %0d", k));
        check(capture == (k == L), "capture slot");
        check(last_shift == (k == 0), "last shift marker");
        check(unload_valid == (k != L && r != 0), "unload window");
        check(vec_odd == ((r % 2) == 0), "vector parity");
        check(round_idx == 16'(r), "round index");
        check(!done, "no early done");
        if (se) shifts++;
        if (unload_valid) unloads++;
        @(negedge clk);
      end
    end
    check(done && !busy && !se, "done after rounds*(L+1) clocks");
    check(shifts == rounds * L && unloads == (rounds - 1) * L, "shift and unload counts");
    @(negedge clk);
    check(!done && cnt == 7'(L), "idle after done");
  endtask

  initial begin
    num_patterns = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !se && cnt == 7'(L), "idle after reset");
    // zero rounds: ignored
    start = 1'b1; @(negedge clk); start = 1'b0;
    check(!busy, "zero rounds ignored");
    session(3);
    session(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
