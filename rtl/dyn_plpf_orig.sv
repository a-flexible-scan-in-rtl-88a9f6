// dyn_plpf_orig -- dynamically controlled PLPF built from the original
// majority PLPFs, the form placed on the test chip.
//
// Three candidates for the scan-in bit run in parallel: the current bit T_j
// itself (n=1), a 3-input majority PLPF (n=2: T_j, T_j+1, S_j-1) and a
// 5-input majority PLPF (n=3: T_j, T_j+1, T_j+2, S_j-1, S_j-2). A 3:1
// multiplexer picks one of them from the PLPF control word. The code of the
// control word is this design's: "11" n=1, "00" n=3, anything else n=2, so
// that the same controllers drive this circuit and dyn_plpf_opt.
// Combinational.
module dyn_plpf_orig
  import lbist_pkg::*;
(
  input  logic [2:0]  t,       // t[0] = T_j, t[1] = T_j+1, t[2] = T_j+2
  input  logic [1:0]  s_past,  // s_past[0] = S_j-1, s_past[1] = S_j-2
  input  plpf_ctrl_t  ctrl,
  output logic        s        // S_j
);

  logic s_n2, s_n3;

  plpf_orig #(.N(2)) u_n2 (.t(t[1:0]), .s_past(s_past[0:0]), .s(s_n2));
  plpf_orig #(.N(3)) u_n3 (.t(t),      .s_past(s_past),      .s(s_n3));

  always_comb begin
    unique case (ctrl)
      CTRL_N1: s = t[0];
      CTRL_N3: s = s_n3;
      default: s = s_n2;
    endcase
  end

endmodule
