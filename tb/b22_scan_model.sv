// b22_scan_model -- behavioural stand-in for the circuit under test of the
// test chip: ten copies of a nine-chain benchmark circuit, i.e. N_CHAINS
// scan chains, three of every nine 83 flip-flops long and six 82 long.
// Not a model of the real benchmark logic: its capture function is an
// arbitrary mix of neighbouring flip-flops, enough to give the MISR a
// response that depends on every scan-in bit.
//
// se = 1: every chain shifts one place, taking scan_in at flip-flop 0.
// se = 0: every flip-flop captures its capture function. ff1/ff2 are
// flip-flops 0 and 1 of each chain (the PLPF past bits), scan_out the
// last flip-flop.
module b22_scan_model #(
  parameter int unsigned N_CHAINS = 90,
  parameter int unsigned L_MAX    = 83
) (
  input  logic                clk,
  input  logic                se,
  input  logic [N_CHAINS-1:0] scan_in,
  output logic [N_CHAINS-1:0] ff1,
  output logic [N_CHAINS-1:0] ff2,
  output logic [N_CHAINS-1:0] scan_out
);

  function automatic int unsigned chain_len(int unsigned c);
    return ((c % 9) < 3) ? L_MAX : L_MAX - 1;
  endfunction

  logic [L_MAX-1:0] ff [N_CHAINS];

  always_ff @(posedge clk) begin
    for (int unsigned c = 0; c < N_CHAINS; c++) begin
      int unsigned len;
      len = chain_len(c);
      if (se) begin
        ff[c] <= {ff[c][L_MAX-2:0], scan_in[c]};
      end else begin
        for (int unsigned p = 0; p < len; p++)
          ff[c][p] <= (ff[c][p] & ff[(c + 1) % N_CHAINS][p]) ^ ff[c][(p + 1) % len]
                      ^ ((p % 5) == 0);
      end
    end
  end

  always_comb begin
    for (int unsigned c = 0; c < N_CHAINS; c++) begin
      ff1[c]      = ff[c][0];
      ff2[c]      = ff[c][1];
      scan_out[c] = ff[c][chain_len(c) - 1];
    end
  end

endmodule
