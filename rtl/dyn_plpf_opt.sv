// dyn_plpf_opt -- optimized dynamically controlled PLPF, one per scan chain.
//
// One AND/OR/mux PLPF for n=3 whose future bits can be switched off by the
// 2-bit PLPF control word. For the AND branch an inactive future bit is
// forced to 1 (OR with its control bit); for the OR branch it is forced to 0
// (AND with the inverted control bit). So control "11" passes the current
// bit T_j through (n=1, 50 % toggle rate), "00" gives the n=3 filter
// (7.14 %), and "10" (T_j+2 inactive) the n=2 filter (16.67 %). The mux is
// steered by the past bit S_j-1 from the first scan flip-flop, as in the
// single PLPF, so the gated bits (forced to 1 while S_j-1 = 0, to 0 while
// S_j-1 = 1) feed one fixed n=3 plpf_opt; the result is the same function
// as gating each branch separately. Changing the control word from one clock to the next is what
// splits a scan-in pattern into parts of different toggle rate.
// Combinational.
module dyn_plpf_opt
  import lbist_pkg::*;
(
  input  logic [2:0]  t,       // t[0] = T_j, t[1] = T_j+1, t[2] = T_j+2
  input  logic        s_prev,  // S_j-1
  input  plpf_ctrl_t  ctrl,    // ctrl[0] gates T_j+1, ctrl[1] gates T_j+2
  output logic        s        // S_j
);

  // An inactive future bit must not make the output toggle: it is forced to
  // the value that leaves the branch chosen by S_j-1 to T_j alone.
  logic [2:0] t_g;
  assign t_g[0] = t[0];
  assign t_g[1] = s_prev ? (t[1] & ~ctrl[0]) : (t[1] | ctrl[0]);
  assign t_g[2] = s_prev ? (t[2] & ~ctrl[1]) : (t[2] | ctrl[1]);

  plpf_opt #(.N(3)) u_plpf (.t(t_g), .s_prev(s_prev), .s(s));

endmodule
