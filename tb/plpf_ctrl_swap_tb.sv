// plpf_ctrl_swap_tb -- self-checking testbench for plpf_ctrl_swap.
//
// Eight chains, L = 83, four vectors. The testbench plays the scan-shift
// counter and the vector parity. Expected: chain c (1-based) uses
// (alpha, beta, gamma) when c and the 1-based vector index have the same
// parity and (gamma, beta, alpha) otherwise, so the n=1 window sits at
// positions alpha .. alpha+beta-1 or gamma .. gamma+beta-1. Switch timings
// of the published form (L/2-i, i, L/2) with i = 19 and an asymmetric one
// (14, 43, 26) are used. The number of swaps seen is counted.
module plpf_ctrl_swap_tb;
  import lbist_pkg::*;
  localparam int L  = 83;
  localparam int NC = 8;
  logic clk = 1'b0, rst_n = 1'b0, active = 1'b0, vec_odd;
  logic [6:0] cnt, alpha, beta;
  plpf_ctrl_t [NC-1:0] ctrl;
  int checks = 0, failures = 0, swaps = 0;

  always #10 clk = ~clk;

  plpf_ctrl_swap #(.N_CHAINS(NC)) dut (.*);

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

  task automatic run(input int a, input int b, input int vectors);
    int g;
    bit prev_a[NC];
    g = L - a - b;
    alpha = 7'(a); beta = 7'(b);
    @(negedge clk) active = 1'b1;
    for (int v = 1; v <= vectors; v++) begin
      vec_odd = (v % 2) == 1;
      for (int k = L; k >= 0; k--) begin
        cnt = 7'(k);
        #1;
        if (k != L) begin
          for (int c = 1; c <= NC; c++) begin
            bit use_a, exp;
            int lo;
            use_a = (c % 2) == (v % 2);
            lo = use_a ? a : g;
            exp = (k >= lo) && (k < lo + b);
            check(ctrl[c-1] == (exp ? CTRL_N1 : CTRL_N3),
                  $sformatf("(%0d,%0d) vector %0d chain %0d position %0d", a, b, v, c, k));
            if (k == 0) begin
              if (v > 1 && prev_a[c-1] != use_a) swaps++;
              prev_a[c-1] = use_a;
            end
          end
        end
        @(negedge clk);
      end
    end
    active = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    cnt = 7'(L); alpha = '0; beta = '0; vec_odd = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(41 - 19, 19, 4);
    run(14, 43, 4);
    check(swaps == 2 * 3 * NC, $sformatf("swaps seen %0d", swaps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
