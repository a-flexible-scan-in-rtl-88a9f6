// plpf_ctrl_basic -- PLPF controller for the Basic approach: one switch
// timing (alpha, beta, gamma) for every scan chain and every test vector.
//
// Each scan-in pattern of length L = alpha+beta+gamma is made of an n=3
// part of gamma bits (shifted in first, ending far from the scan input), an
// n=1 part of beta bits and an n=3 part of alpha bits (ending next to the
// scan input). The published setting uses alpha = gamma (or differing by
// one); beta follows from the required weighted transition count. One
// switch_tff turns the n=1 window on and off from the scan-shift count; its
// output drives both control bits, so the word is "11" (n=1) or "00" (n=3).
// alpha and beta are inputs and must satisfy alpha+beta <= L; tying them to
// constants reduces the decoders to the fixed AND gates of the published
// controller. The control word is registered: it changes one clock after the
// count reaches a switch point.
module plpf_ctrl_basic
  import lbist_pkg::*;
#(
  parameter int unsigned L  = lbist_pkg::TEG_CHAIN_LEN,
  localparam int unsigned CW = $clog2(L + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          active,
  input  logic [CW-1:0] cnt,
  input  logic [CW-1:0] alpha,
  input  logic [CW-1:0] beta,
  output plpf_ctrl_t    ctrl
);

  logic n1;

  switch_tff #(.CW(CW)) u_tff (
    .clk, .rst_n, .active, .cnt,
    .p_lo({1'b0, alpha}),
    .p_hi({1'b0, alpha} + {1'b0, beta}),
    .q(n1)
  );

  assign ctrl = {n1, n1};

endmodule
