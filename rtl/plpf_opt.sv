// plpf_opt -- the optimized PLPF. The N bits from the phase shifter (current
// bit T_j and future bits T_j+1 .. T_j+N-1) feed one N-input AND and one
// N-input OR; a 2:1 multiplexer controlled by the past bit S_j-1 (the first
// scan flip-flop) picks the AND when S_j-1 = 0 and the OR when S_j-1 = 1.
// The scan-in bit therefore only changes when the current bit and all N-1
// future bits agree and differ from the past bit. For N=2 this is the same
// function as the 3-input majority PLPF; for N=3 it needs S_j-1 only.
// Expected toggle rate 1/(2^(N+1)-2). Combinational.
module plpf_opt #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] t,       // t[0] = T_j, t[k] = T_j+k
  input  logic         s_prev,  // S_j-1, first flip-flop of the scan chain
  output logic         s        // S_j
);

  assign s = s_prev ? (|t) : (&t);

endmodule
