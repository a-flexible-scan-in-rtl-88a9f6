// plpf_ctrl_swap -- PLPF controller for the Swap approach.
//
// Two switch timings are used: A = (alpha, beta, gamma) as programmed and
// B = (gamma, beta, alpha) with head and tail lengths swapped, gamma being
// L - alpha - beta. (The published example is A = (L/2-i, i, L/2) and
// B = (L/2, i, L/2-i).) A chain gets timing A when the parity of its 1-based
// index equals the parity of the 1-based index of the test vector, and B
// otherwise: odd chains use A on odd vectors and B on even vectors, even
// chains the reverse. The n=1 window of a chain therefore jumps between two
// places from vector to vector and neighbouring chains never share it.
// Two switch_tff units (one per timing) and a per-chain 2:1 select; the
// vector parity comes from the scan-shift counter. Registered like
// plpf_ctrl_basic; requires alpha+beta <= L.
module plpf_ctrl_swap
  import lbist_pkg::*;
#(
  parameter int unsigned L        = lbist_pkg::TEG_CHAIN_LEN,
  parameter int unsigned N_CHAINS = lbist_pkg::TEG_CHAINS,
  localparam int unsigned CW = $clog2(L + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      active,
  input  logic [CW-1:0]             cnt,
  input  logic                      vec_odd,  // 1-based vector index is odd
  input  logic [CW-1:0]             alpha,
  input  logic [CW-1:0]             beta,
  output plpf_ctrl_t [N_CHAINS-1:0] ctrl
);

  logic [CW:0] gamma;
  logic        n1_a, n1_b;

  assign gamma = CW'(L) - {1'b0, alpha} - {1'b0, beta};

  switch_tff #(.CW(CW)) u_tff_a (
    .clk, .rst_n, .active, .cnt,
    .p_lo({1'b0, alpha}),
    .p_hi({1'b0, alpha} + {1'b0, beta}),
    .q(n1_a)
  );

  switch_tff #(.CW(CW)) u_tff_b (
    .clk, .rst_n, .active, .cnt,
    .p_lo(gamma),
    .p_hi(gamma + {1'b0, beta}),
    .q(n1_b)
  );

  always_comb begin
    for (int unsigned c = 0; c < N_CHAINS; c++) begin
      // chain index c+1 is odd when c is even
      logic use_a;
      use_a   = ((c % 2) == 0) == vec_odd;
      ctrl[c] = use_a ? {n1_a, n1_a} : {n1_b, n1_b};
    end
  end

endmodule
