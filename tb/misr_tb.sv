// misr_tb -- self-checking testbench for misr.
//
// Feeds 500 clocks of random 90-bit scan-out words into the 11-bit MISR
// and compares the signature with a reference that folds the inputs and
// applies the x^11 + x^9 + x^8 + 1 feedback bit by bit. Also checks clear,
// hold when disabled, and that flipping one input bit in one clock
// changes the signature (single-error detection).
module misr_tb;
  localparam int W = 11, N = 90;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0;
  logic [N-1:0] d;
  logic [W-1:0] sig;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  misr dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic [W-1:0] ref_step(input logic [W-1:0] s, input logic [N-1:0] x);
    logic [W-1:0] n;
    bit fb;
    fb = s[10] ^ s[8] ^ s[7];
    n[0] = fb;
    for (int i = 1; i < W; i++) n[i] = s[i-1];
    for (int j = 0; j < N; j++) n[j % W] ^= x[j];
    return n;
  endfunction

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] words[500];

  initial begin
    logic [W-1:0] r, good;
    d = '0;
    for (int i = 0; i < 500; i++) words[i] = {$urandom, $urandom, $urandom};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(sig == '0, "reset");
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk) clear = 1'b1;
      @(negedge clk) clear = 1'b0;
      check(sig == '0, "clear");
      r = '0;
      en = 1'b1;
      for (int i = 0; i < 500; i++) begin
        d = words[i];
        if (pass == 1 && i == 250) d[37] = ~d[37];
        r = ref_step(r, d);
        @(negedge clk);
        check(sig == r, $sformatf("pass %0d step %0d", pass, i));
      end
      en = 1'b0;
      d = '1;
      repeat (3) @(negedge clk);
      check(sig == r, "hold when disabled");
      if (pass == 0) good = r;
      else check(r != good, "one flipped bit changes the signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
