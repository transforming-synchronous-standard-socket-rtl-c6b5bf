// gated_ring_osc: behavioural model of a ring oscillator gated by an enable.
//
// Behavioural model, not synthesizable: the real part is a string of STAGES
// inverters closed into a ring through an AND gate with en, so the ring runs
// only while en is high; its frequency is set by the inverter delay. Each
// half period lasts STAGES * INV_DELAY_PS. When en rises the output rises at
// once (the AND passes the idle-high ring node); en is expected to fall only
// while clk is low, which the clock-gate controller guarantees.
// STAGES = 500 is the inverter count of the document's clock generators;
// the inverter delay is this design's choice (10 ps gives 100 MHz).
module gated_ring_osc #(
  parameter int unsigned STAGES       = 500,
  parameter int unsigned INV_DELAY_PS = 10
) (
  input  logic en,
  output logic clk
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime HALF_NS = real'(STAGES) * real'(INV_DELAY_PS) / 1000.0;

  initial clk = 1'b0;

  always begin
    wait (en);
    clk = 1'b1;
    #(HALF_NS);
    clk = 1'b0;
    #(HALF_NS);
  end
endmodule
