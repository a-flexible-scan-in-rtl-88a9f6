// lfsr -- Fibonacci linear feedback shift register used as the test pattern
// generator (TPG).
//
// Stage FF1 is bit 0. Each enabled clock the register shifts FF1 -> FF2 ->
// ... -> FFW and FF1 takes the XOR of the stages named by POLY (bit k-1 for
// the term x^k). Defaults are the test chip's 22-bit LFSR, x^22 + x^21 + 1,
// started from all ones; the 16-bit generator of the simulation study is
// available through lbist_pkg. `init` reloads SEED synchronously and takes
// precedence over `en`. The state is visible one clock after the edge that
// produced it; there is no combinational path from input to output.
module lfsr #(
  parameter int unsigned  W    = lbist_pkg::TEG_LFSR_W,
  parameter logic [W-1:0] POLY = lbist_pkg::TEG_LFSR_POLY,
  parameter logic [W-1:0] SEED = '1
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous, active low: load SEED
  input  logic         init,   // synchronous reload of SEED
  input  logic         en,     // advance one step
  output logic [W-1:0] q       // q[0] = FF1
);

  logic fb;
  assign fb = ^(q & POLY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (init) q <= SEED;
    else if (en)   q <= {q[W-2:0], fb};
  end

  initial assert (SEED != '0) else $error("lfsr: an all-zero seed locks the register");

endmodule
