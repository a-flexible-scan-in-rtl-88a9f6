// scan_shift_counter -- scan-shift counter and pattern sequencer of the LBIST
// controller. It drives scan enable and gives the PLPF controllers the count
// they decode their switch timings from.
//
// A session of num_patterns rounds starts with a one-clock `start` pulse.
// Every round has L+1 clocks: one capture slot with cnt = L and se = 0,
// then L shift clocks with se = 1 in which cnt counts down L-1 .. 0. In a
// shift clock cnt is the chain position (0 = the flip-flop next to the scan
// input) at which the bit shifted in during that clock comes to rest when
// shifting ends; a switch timing (alpha, alpha+beta) is therefore a pair of
// count values. The first round's capture slot captures nothing useful and
// its shift clocks unload an undefined chain, so `unload_valid` marks the
// shift clocks of later rounds, whose scan-out is a real test response.
// vec_odd is 1 while the 1-based index of the vector being shifted in is
// odd. `last_shift` is high in each round's final shift clock. `done` pulses
// for one clock after the last round; between sessions cnt rests at L.
// The counter width, the capture slot and the session protocol are this
// design's choices; the published scheme only names the counter.
module scan_shift_counter #(
  parameter int unsigned L  = lbist_pkg::TEG_CHAIN_LEN,
  parameter int unsigned PW = 16,
  localparam int unsigned CW = $clog2(L + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [PW-1:0] num_patterns,  // rounds in the session, >= 1
  output logic [CW-1:0] cnt,
  output logic          busy,
  output logic          se,
  output logic          capture,
  output logic          last_shift,
  output logic          unload_valid,
  output logic          vec_odd,
  output logic [PW-1:0] round_idx,
  output logic          done
);

  localparam logic [CW-1:0] CNT_CAP = CW'(L);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= CNT_CAP;
      busy      <= 1'b0;
      round_idx <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        cnt <= CNT_CAP;
        if (start && num_patterns != '0) begin
          busy      <= 1'b1;
          round_idx <= '0;
        end
      end else if (cnt == '0) begin
        cnt <= CNT_CAP;
        if (round_idx == num_patterns - 1'b1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round_idx <= round_idx + 1'b1;
        end
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  assign se           = busy && (cnt != CNT_CAP);
  assign capture      = busy && (cnt == CNT_CAP);
  assign last_shift   = busy && (cnt == '0);
  assign unload_valid = se && (round_idx != '0);
  assign vec_odd      = ~round_idx[0];

endmodule
