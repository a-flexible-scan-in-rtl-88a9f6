// plpf_ctrl_moving -- PLPF controller for the Moving approach.
//
// The n=1 window keeps its length beta but moves by one position with every
// test vector: the first vector uses the programmed (alpha, beta, gamma),
// each following vector has alpha one smaller and gamma one larger, so the
// window travels toward the scan input. After the vector with alpha = 0 the
// next one starts again at alpha = L - beta (gamma = 0), so over L-beta+1
// vectors every scan flip-flop receives unfiltered pseudo-random bits. The
// wrap-around point is this design's reading of the loop in the published
// figure. A register holds the current alpha and steps at the end of each
// round's last shift clock; one switch_tff makes the window from it, and the
// word drives all chains. Requires alpha+beta <= L and beta < L+1.
module plpf_ctrl_moving
  import lbist_pkg::*;
#(
  parameter int unsigned L  = lbist_pkg::TEG_CHAIN_LEN,
  localparam int unsigned CW = $clog2(L + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          active,
  input  logic [CW-1:0] cnt,
  input  logic          last_shift,  // final shift clock of a round
  input  logic [CW-1:0] alpha,       // alpha of the first vector
  input  logic [CW-1:0] beta,
  output plpf_ctrl_t    ctrl,
  output logic [CW-1:0] cur_alpha    // alpha of the vector being shifted
);

  logic n1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           cur_alpha <= '0;
    else if (!active)     cur_alpha <= alpha;
    else if (last_shift)  cur_alpha <= (cur_alpha == '0) ? CW'(L) - beta
                                                         : cur_alpha - 1'b1;
  end

  switch_tff #(.CW(CW)) u_tff (
    .clk, .rst_n, .active, .cnt,
    .p_lo({1'b0, cur_alpha}),
    .p_hi({1'b0, cur_alpha} + {1'b0, beta}),
    .q(n1)
  );

  assign ctrl = {n1, n1};

endmodule
