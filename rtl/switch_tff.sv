// switch_tff -- one switch-timing unit of a PLPF controller: two count
// decoders and a toggle flip-flop.
//
// The decoders compare the scan-shift count with the two switch points
// p_lo = alpha and p_hi = alpha+beta. At the end of the clock in which the
// count equals p_hi the toggle flip-flop turns on (n=1 from the next shift
// clock), at the end of the clock in which it equals p_lo it turns off
// (back to n=3). With the count running L, L-1 .. 0 this gives n=3 for the
// gamma positions >= alpha+beta, n=1 for the beta positions alpha ..
// alpha+beta-1 and n=3 for the alpha positions below alpha. In the
// published controller the decoders are AND gates wired to fixed count
// values and merge through an OR; here the switch points are inputs, and
// the merge is an XOR so that beta = 0 (both points equal) leaves the
// flip-flop off instead of toggling it once. For distinct points the two
// are the same. The flip-flop is held at 0 while `active` is low.
module switch_tff #(
  parameter int unsigned CW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          active,  // a test session is running
  input  logic [CW-1:0] cnt,     // scan-shift count
  input  logic [CW:0]   p_lo,    // alpha
  input  logic [CW:0]   p_hi,    // alpha + beta
  output logic          q        // 1: n=1 (random part), 0: n=3
);

  logic hit_lo, hit_hi;
  assign hit_lo = ({1'b0, cnt} == p_lo);
  assign hit_hi = ({1'b0, cnt} == p_hi);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  q <= 1'b0;
    else if (!active)            q <= 1'b0;
    else if (hit_lo ^ hit_hi)    q <= ~q;
  end

endmodule
