// psf -- phase shifter for filter (PSF): gives every scan chain its current
// scan-in bit T_j and the NFUT following bits T_j+1 .. T_j+NFUT of the same
// stream, all in the same clock, so that a PLPF can look ahead.
//
// Each output is the XOR (parity) of a set of LFSR stages, a tap mask.
// If the mask m gives T_j now, then the mask that gives the value m will
// give one clock later is  m' = (m >> 1) ^ (m[0] ? POLY : 0),  because every
// stage k+1 takes stage k and FF1 takes the feedback. Applying this k times
// yields the mask of T_j+k, so a look-ahead bit costs only XOR gates on the
// LFSR stages (for chain 1 of a 4-bit LFSR the masks are simply FF4, FF3,
// FF2, as in the published example). The masks are constants worked out at
// elaboration; the block is purely combinational.
//
// The base mask of chain c is this design's own choice (the published
// method takes its phase shifter from a separate synthesis procedure): three
// stages picked by a stride-5 rule, which gives distinct, non-zero masks for
// every chain count of up to W*(W-3) chains. Output t[c][k] is T_j+k of
// chain c.
module psf #(
  parameter int unsigned  W        = lbist_pkg::TEG_LFSR_W,
  parameter logic [W-1:0] POLY     = lbist_pkg::TEG_LFSR_POLY,
  parameter int unsigned  N_CHAINS = lbist_pkg::TEG_CHAINS,
  parameter int unsigned  NFUT     = 2
) (
  input  logic [W-1:0]                     lfsr_q,
  output logic [N_CHAINS-1:0][NFUT:0]      t
);

  // Stages of chain c's current bit.
  function automatic logic [W-1:0] base_mask(int unsigned c);
    int unsigned q, i0;
    logic [W-1:0] m;
    q  = c / W;
    i0 = (5 * c) % W;
    m  = '0;
    m[i0]                     ^= 1'b1;
    m[(i0 + q + 1) % W]       ^= 1'b1;
    m[(i0 + 2 * q + 3) % W]   ^= 1'b1;
    return m;
  endfunction

  // Mask of the next bit of the stream produced by mask m.
  function automatic logic [W-1:0] advance(logic [W-1:0] m);
    return (m >> 1) ^ (m[0] ? POLY : '0);
  endfunction

  always_comb begin
    for (int unsigned c = 0; c < N_CHAINS; c++) begin
      logic [W-1:0] m;
      m = base_mask(c);
      for (int unsigned k = 0; k <= NFUT; k++) begin
        t[c][k] = ^(m & lfsr_q);
        m = advance(m);
      end
    end
  end

endmodule
