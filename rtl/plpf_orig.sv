// plpf_orig -- the original PLPF: a majority vote (moving average) over
// 2N-1 bits, the current bit T_j, the N-1 future bits T_j+1 .. T_j+N-1 from
// the phase shifter and the N-1 past bits S_j-1 .. S_j-N+1 fed back from the
// first N-1 flip-flops of the scan chain. The vote is the scan-in bit S_j.
//
// The published circuit is a sum of products of AND gates (three 2-input
// ANDs for N=2, ten 3-input ANDs for N=3) into one OR; the function is the
// same majority and is written here as a population count, which synthesis
// maps to gates. Combinational; N >= 2 (N=1 is a plain wire).
module plpf_orig #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] t,       // t[0] = T_j, t[k] = T_j+k
  input  logic [N-2:0] s_past,  // s_past[0] = S_j-1, s_past[k] = S_j-1-k
  output logic         s        // S_j, to the scan-chain input
);

  always_comb begin
    int unsigned ones;
    ones = 0;
    for (int unsigned k = 0; k < N; k++)     ones += t[k];
    for (int unsigned k = 0; k < N - 1; k++) ones += s_past[k];
    s = (ones >= N);
  end

  initial assert (N >= 2) else $error("plpf_orig: N must be at least 2");

endmodule
