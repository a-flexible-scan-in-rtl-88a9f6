// lbist_pkg -- types and constants shared by the scan-in power control LBIST.
//
// The PLPF (pseudo low-pass filter) sits between the phase shifter and each
// scan chain and lowers the toggle rate of the pseudo-random scan-in stream.
// A PLPF with n inputs from the phase shifter (the current bit T_j and the
// future bits T_j+1 .. T_j+n-1) has an expected toggle rate of 1/(2^(n+1)-2):
// 50 % for n=1, 16.67 % for n=2, 7.14 % for n=3.
//
// The dynamically controlled PLPF is steered by a 2-bit "PLPF control" word,
// one bit per future bit; a 1 makes that future bit inactive. "11" passes the
// current bit through (n=1), "00" gives the n=3 filter. The two control bits
// and their meaning follow the published circuit; the n=2 code "10" (T_j+2
// inactive, T_j+1 active) is this design's naming.
//
// Polynomials are written as tap masks: bit k-1 set for the term x^k
// (the constant term is implied).
package lbist_pkg;

  // PLPF control word: bit 0 gates T_j+1, bit 1 gates T_j+2; 1 = inactive.
  typedef logic [1:0] plpf_ctrl_t;
  localparam plpf_ctrl_t CTRL_N1 = 2'b11;  // raw LFSR bit, 50 %
  localparam plpf_ctrl_t CTRL_N2 = 2'b10;  // 3-input filter, 16.67 %
  localparam plpf_ctrl_t CTRL_N3 = 2'b00;  // 5-input filter, 7.14 %

  // Where the PLPF control words come from.
  typedef enum logic [1:0] {
    APP_EXTERNAL = 2'd0,  // control word driven from pins
    APP_BASIC    = 2'd1,  // one switch timing for every chain and vector
    APP_SWAP     = 2'd2,  // alpha and gamma swapped by chain and vector parity
    APP_MOVING   = 2'd3   // random window moved one bit per vector
  } approach_e;

  // Which dynamically controlled PLPF circuit is built.
  typedef enum logic {
    PLPF_OPT  = 1'b0,     // AND/OR/mux circuit with gated future bits
    PLPF_ORIG = 1'b1      // majority PLPFs for n=2, n=3 and a 3:1 mux
  } plpf_style_e;

  // Test-chip TPG: 22-bit LFSR, x^22 + x^21 + 1, seed all ones.
  localparam int unsigned       TEG_LFSR_W    = 22;
  localparam logic [21:0]       TEG_LFSR_POLY = 22'h30_0000;
  // Simulation-study TPG: 16-bit LFSR, x^16 + x^15 + x^13 + x^4 + 1,
  // seed 1010...1010.
  localparam int unsigned       SIM_LFSR_W    = 16;
  localparam logic [15:0]       SIM_LFSR_POLY = 16'hD008;
  localparam logic [15:0]       SIM_LFSR_SEED = 16'hAAAA;
  // Test-chip response compactor: 11-bit MISR, x^11 + x^9 + x^8 + 1.
  localparam int unsigned       TEG_MISR_W    = 11;
  localparam logic [10:0]       TEG_MISR_POLY = 11'h580;

  // Test-chip CUT: ten copies of b22, nine scan chains each, 83 or 82 long.
  localparam int unsigned       TEG_CHAINS    = 90;
  localparam int unsigned       TEG_CHAIN_LEN = 83;
  // Ring-oscillator measurement window: 2048 clocks of 20 ns.
  localparam int unsigned       TEG_RO_WINDOW = 2048;

endpackage
