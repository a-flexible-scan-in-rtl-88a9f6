// misr -- multiple-input signature register compacting the scan-out
// streams of all chains.
//
// A W-bit Fibonacci register (stage 1 = bit 0) whose feedback into stage 1
// is the XOR of the stages named by POLY (bit k-1 for x^k). Every enabled
// clock the register shifts and each stage is XORed with one input bit: the
// N_IN scan outputs are folded onto the W stages, input i going to stage
// i mod W. The default is the test chip's 11-bit MISR; the feedback
// x^11 + x^9 + x^8 + 1 and the input folding are this design's choices
// (the chip's text gives the width and the terms x^9 + x^8 + 1).
// `clear` zeroes the signature; the signature is valid one clock after the
// last enabled clock.
module misr #(
  parameter int unsigned  W    = lbist_pkg::TEG_MISR_W,
  parameter logic [W-1:0] POLY = lbist_pkg::TEG_MISR_POLY,
  parameter int unsigned  N_IN = lbist_pkg::TEG_CHAINS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            en,
  input  logic [N_IN-1:0] d,
  output logic [W-1:0]    sig
);

  logic [W-1:0] fold;
  always_comb begin
    fold = '0;
    for (int unsigned i = 0; i < N_IN; i++) fold[i % W] ^= d[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sig <= '0;
    else if (clear) sig <= '0;
    else if (en)    sig <= {sig[W-2:0], ^(sig & POLY)} ^ fold;
  end

endmodule
