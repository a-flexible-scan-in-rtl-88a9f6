// lbist_teg_top -- scan-based logic BIST with flexible scan-in power
// control, arranged as on the 65 nm evaluation chip: one LFSR feeds a phase
// shifter for filter (PSF), a dynamically controlled PLPF sits in front of
// every scan chain, an 11-bit MISR compacts the scan-outs, and three ring
// oscillators with a frequency counter watch the on-die delay.
//
// How it works. During each shift clock the PLPF of a chain produces the
// scan-in bit from the chain's current LFSR bit, its next two bits and the
// first one or two scan flip-flops. A PLPF controller switches the filter
// between n=3 (7.14 % toggle rate) and n=1 (raw LFSR, 50 %) at two count
// values of the scan-shift counter, so that every pattern is split into an
// n=3 head (gamma bits), an n=1 middle (beta bits) and an n=3 tail (alpha
// bits). Choosing beta sets the weighted transition count of the scan-in
// and hence the shift power anywhere between the two filters' levels.
// `approach` selects where the control words come from: the pins
// (ext_ctrl), the Basic, the Swap or the Moving controller. The circuit
// built for the PLPFs is chosen by PLPF_STYLE: PLPF_OPT (AND/OR/mux form,
// the proposed circuit, default) or PLPF_ORIG (majority PLPFs and a mux,
// the form placed on the chip).
//
// The circuit under test is outside: scan_in drives the N_CHAINS chain
// inputs, scan_ff1/scan_ff2 return each chain's first and second flip-flop
// (the PLPF's past bits; scan_ff2 is read only by the majority style, so a
// lint tool reports it unused in the default AND/OR build), scan_out
// returns the chain outputs, and se is the scan enable. A session is
// started with `start`; it runs num_patterns rounds of one capture clock
// and L shift clocks. The responses of rounds
// 2..num_patterns are compacted, so P vectors need P+1 rounds. `signature`
// is valid when `done` pulses. Ring oscillator i runs while ro_en[i] is
// high; ro_start measures the one chosen by ro_sel for RO_WINDOW clocks
// (change ro_sel only while ro_busy is low).
//
// Defaults are the chip's: 90 chains (ten b22 copies with nine chains each)
// of at most 83 flip-flops, 22-bit LFSR x^22+x^21+1 seeded with all ones,
// 11-bit MISR, 2048-clock ring-oscillator window. Run-time switch timings,
// the approach select and the session protocol are this design's choices.
module lbist_teg_top
  import lbist_pkg::*;
#(
  parameter int unsigned       N_CHAINS   = TEG_CHAINS,
  parameter int unsigned       L          = TEG_CHAIN_LEN,
  parameter int unsigned       LFSR_W     = TEG_LFSR_W,
  parameter logic [LFSR_W-1:0] LFSR_POLY  = TEG_LFSR_POLY,
  parameter logic [LFSR_W-1:0] LFSR_SEED  = '1,
  parameter int unsigned       MISR_W     = TEG_MISR_W,
  parameter logic [MISR_W-1:0] MISR_POLY  = TEG_MISR_POLY,
  parameter int unsigned       PW         = 16,
  parameter plpf_style_e       PLPF_STYLE = PLPF_OPT,
  parameter int unsigned       RO_WINDOW  = TEG_RO_WINDOW,
  parameter int unsigned       RO_CW      = 16,
  localparam int unsigned      CW         = $clog2(L + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // BIST control
  input  logic                start,
  input  logic [PW-1:0]       num_patterns,
  input  approach_e           approach,
  input  plpf_ctrl_t          ext_ctrl,
  input  logic [CW-1:0]       alpha,
  input  logic [CW-1:0]       beta,
  output logic                busy,
  output logic                done,
  output logic [MISR_W-1:0]   signature,
  // scan interface to the circuit under test
  output logic                se,
  output logic [N_CHAINS-1:0] scan_in,
  input  logic [N_CHAINS-1:0] scan_ff1,
  input  logic [N_CHAINS-1:0] scan_ff2,
  input  logic [N_CHAINS-1:0] scan_out,
  // ring-oscillator monitors
  input  logic [2:0]          ro_en,
  input  logic [1:0]          ro_sel,
  input  logic                ro_start,
  output logic                ro_busy,
  output logic                ro_done,
  output logic [RO_CW-1:0]    ro_count
);

  // ---------------- sequencing ----------------
  logic [CW-1:0] cnt;
  logic          capture, last_shift, unload_valid, vec_odd;
  logic [PW-1:0] round_idx;
  logic          session_start;

  assign session_start = start && !busy;

  scan_shift_counter #(.L(L), .PW(PW)) u_ssc (
    .clk, .rst_n, .start, .num_patterns,
    .cnt, .busy, .se, .capture, .last_shift, .unload_valid,
    .vec_odd, .round_idx, .done
  );

  // ---------------- TPG: LFSR and PSF ----------------
  logic [LFSR_W-1:0]           lfsr_q;
  logic [N_CHAINS-1:0][2:0]    t;

  lfsr #(.W(LFSR_W), .POLY(LFSR_POLY), .SEED(LFSR_SEED)) u_lfsr (
    .clk, .rst_n, .init(session_start), .en(se), .q(lfsr_q)
  );

  psf #(.W(LFSR_W), .POLY(LFSR_POLY), .N_CHAINS(N_CHAINS), .NFUT(2)) u_psf (
    .lfsr_q, .t
  );

  // ---------------- PLPF controllers ----------------
  plpf_ctrl_t                   ctrl_basic, ctrl_moving;
  plpf_ctrl_t [N_CHAINS-1:0]    ctrl_swap;
  plpf_ctrl_t [N_CHAINS-1:0]    ctrl;
  logic [CW-1:0]                moving_alpha;

  plpf_ctrl_basic #(.L(L)) u_basic (
    .clk, .rst_n, .active(busy), .cnt, .alpha, .beta, .ctrl(ctrl_basic)
  );

  plpf_ctrl_swap #(.L(L), .N_CHAINS(N_CHAINS)) u_swap (
    .clk, .rst_n, .active(busy), .cnt, .vec_odd, .alpha, .beta, .ctrl(ctrl_swap)
  );

  plpf_ctrl_moving #(.L(L)) u_moving (
    .clk, .rst_n, .active(busy), .cnt, .last_shift, .alpha, .beta,
    .ctrl(ctrl_moving), .cur_alpha(moving_alpha)
  );

  always_comb begin
    for (int unsigned c = 0; c < N_CHAINS; c++) begin
      unique case (approach)
        APP_BASIC:  ctrl[c] = ctrl_basic;
        APP_SWAP:   ctrl[c] = ctrl_swap[c];
        APP_MOVING: ctrl[c] = ctrl_moving;
        default:    ctrl[c] = ext_ctrl;
      endcase
    end
  end

  // ---------------- dynamically controlled PLPFs ----------------
  for (genvar c = 0; c < N_CHAINS; c++) begin : g_chain
    if (PLPF_STYLE == PLPF_ORIG) begin : g_orig
      dyn_plpf_orig u_plpf (
        .t(t[c]), .s_past({scan_ff2[c], scan_ff1[c]}), .ctrl(ctrl[c]), .s(scan_in[c])
      );
    end else begin : g_opt
      dyn_plpf_opt u_plpf (
        .t(t[c]), .s_prev(scan_ff1[c]), .ctrl(ctrl[c]), .s(scan_in[c])
      );
    end
  end

  // ---------------- response compaction ----------------
  misr #(.W(MISR_W), .POLY(MISR_POLY), .N_IN(N_CHAINS)) u_misr (
    .clk, .rst_n, .clear(session_start), .en(unload_valid), .d(scan_out), .sig(signature)
  );

  // ---------------- ring-oscillator monitors ----------------
  logic [2:0] ro_osc;
  logic       ro_clk;

  ring_osc #(.STAGES(51), .STAGE_DELAY_PS(34.1)) u_ro1 (.en(ro_en[0]), .osc(ro_osc[0]));
  ring_osc #(.STAGES(51), .STAGE_DELAY_PS(50.3)) u_ro2 (.en(ro_en[1]), .osc(ro_osc[1]));
  ring_osc #(.STAGES(51), .STAGE_DELAY_PS(71.0)) u_ro3 (.en(ro_en[2]), .osc(ro_osc[2]));

  always_comb begin
    unique case (ro_sel)
      2'd1:    ro_clk = ro_osc[1];
      2'd2:    ro_clk = ro_osc[2];
      default: ro_clk = ro_osc[0];
    endcase
  end

  ro_meter #(.WINDOW(RO_WINDOW), .CW(RO_CW)) u_ro_meter (
    .clk, .rst_n, .start(ro_start), .ro_clk, .busy(ro_busy), .done(ro_done), .count(ro_count)
  );

  // capture, round index and the moving controller's position are internal
  // status; they are kept visible for debug through hierarchy only.
  logic unused_status;
  assign unused_status = ^{capture, round_idx, moving_alpha};

endmodule
