// ro_meter -- ring-oscillator frequency counter (the RO control block of the
// test chip).
//
// A `start` pulse in the system clock domain opens a gate for WINDOW clocks
// (2048 clocks of 20 ns = 40.96 us on the chip). The gate is synchronised
// into the ring-oscillator domain by two flip-flops; there a counter,
// cleared on the gate's rising edge, counts oscillator cycles while the gate
// is high. SETTLE system clocks after the gate closes, `done` pulses and
// `count` holds the number of oscillator cycles, which is stable by then, so
// the multi-bit value is read without a synchroniser. The frequency is
// count / (WINDOW * clock period). The window length follows the published
// measurement; the synchroniser, settle time and counter width are this
// design's choices. CW must hold WINDOW * f_ro / f_clk.
module ro_meter #(
  parameter int unsigned WINDOW = lbist_pkg::TEG_RO_WINDOW,
  parameter int unsigned CW     = 16,
  parameter int unsigned SETTLE = 4,
  localparam int unsigned WW    = $clog2(WINDOW + SETTLE + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          ro_clk,   // oscillator output
  output logic          busy,
  output logic          done,
  output logic [CW-1:0] count
);

  // ---- system clock domain: gate window ----
  logic [WW-1:0] wcnt;
  logic          gate;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0;
      busy <= 1'b0;
      gate <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          gate <= 1'b1;
          wcnt <= '0;
        end
      end else begin
        wcnt <= wcnt + 1'b1;
        if (wcnt == WW'(WINDOW - 1)) gate <= 1'b0;
        if (wcnt == WW'(WINDOW + SETTLE - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // ---- oscillator domain: synchroniser and cycle counter ----
  logic [2:0] gate_sync;

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_sync <= '0;
      count     <= '0;
    end else begin
      gate_sync <= {gate_sync[1:0], gate};
      if (gate_sync[1] && !gate_sync[2]) count <= '0;
      else if (gate_sync[2])             count <= count + 1'b1;
    end
  end

endmodule
