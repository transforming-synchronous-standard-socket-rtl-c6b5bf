// clock_gen_gate: local clock generator with the clock-gate option.
//
// The clock runs only while a transaction is in progress: clock_gate_afsm
// starts the gated ring oscillator when the input port asks (rq1/ack1, ack1
// after the first rising edge) and stops it, while the clock is low, when
// the output port asks (rq2/ack2). Between transactions lclk stays low and
// the locally synchronous module draws no clock power.
// Half period = STAGES * INV_DELAY_PS; STAGES = 500 follows the document,
// INV_DELAY_PS is this design's choice. The ring is a behavioural model.
module clock_gen_gate #(
  parameter int unsigned STAGES       = 500,
  parameter int unsigned INV_DELAY_PS = 10
) (
  input  logic rst_n,
  input  logic rq1,
  output logic ack1,
  input  logic rq2,
  output logic ack2,
  output logic lclk
);
  timeunit 1ns;
  timeprecision 1ps;

  logic clk_en;

  clock_gate_afsm u_afsm (
    .rst_n (rst_n),
    .lclk  (lclk),
    .rq1   (rq1),
    .ack1  (ack1),
    .rq2   (rq2),
    .ack2  (ack2),
    .clk_en(clk_en)
  );

  gated_ring_osc #(
    .STAGES      (STAGES),
    .INV_DELAY_PS(INV_DELAY_PS)
  ) u_ring (
    .en (clk_en),
    .clk(lclk)
  );
endmodule
