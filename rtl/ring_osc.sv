// ring_osc -- behavioural model of a 51-stage ring-oscillator delay monitor
// (not synthesizable; the real part is a hand-placed ring of gates).
//
// The test chip carries three rings: 51 stages of 2-input NAND (RO1), of
// 3-input NAND (RO2) and of 4-input OR-NAND (RO3), each with one fanout per
// stage. Their frequency falls as the die heats up and the supply droops,
// which is how the scan-shift power shows up as delay. This model gives a
// square wave of period 2 * STAGES * STAGE_DELAY_PS while `en` is high and
// holds `osc` low while `en` is low. The default stage delay (34.1 ps, about
// 287.5 MHz) matches the RO1 frequency measured at the lowest scan-in
// toggle rate; 50.3 ps and 71.0 ps give the RO2 and RO3 values. The model
// has no temperature or voltage input.
module ring_osc #(
  parameter int unsigned STAGES         = 51,
  parameter real         STAGE_DELAY_PS = 34.1
) (
  input  logic en,
  output logic osc
);

  localparam real HALF_PS = STAGES * STAGE_DELAY_PS;

  initial osc = 1'b0;

  always begin
    if (en) begin
      #(HALF_PS * 1ps) osc = en ? ~osc : 1'b0;
    end else begin
      osc = 1'b0;
      @(posedge en);
    end
  end

endmodule
