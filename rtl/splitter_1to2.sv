// splitter_1to2: one node of the asynchronous central switch.
//
// It distributes a 4-phase bundled-data request channel coming from the
// initiator side (ip*) to one of two target sides (tp1*, tp2*) and routes the
// response channel of the chosen target back. The choice is made by one bit of
// the request bundle, SEL_BIT, which is an OCP address bit. The node is purely
// combinational: request strobes and response acknowledges are steered by the
// select bit, the request acknowledge, response request and response data are
// taken from the chosen side, and the request data goes to both sides.
//
// Timing: the select bit must stay stable from the request strobe until the
// response handshake has returned to zero; the initiator wrapper holds its
// request bundle until its next transaction, which guarantees this.
// Target 1 is chosen when the select bit is 1 (this design's choice).
module splitter_1to2 #(
  parameter int unsigned REQ_W   = 19,
  parameter int unsigned RSP_W   = 10,
  parameter int unsigned SEL_BIT = 15
) (
  // initiator side
  input  logic             ip_rq_in,
  output logic             ip_ack_in,
  input  logic [REQ_W-1:0] ip_data_in,
  output logic             ip_rq_out,
  input  logic             ip_ack_out,
  output logic [RSP_W-1:0] ip_data_out,
  // target 1 side
  output logic             tp1_rq_in,
  input  logic             tp1_ack_in,
  output logic [REQ_W-1:0] tp1_data_in,
  input  logic             tp1_rq_out,
  output logic             tp1_ack_out,
  input  logic [RSP_W-1:0] tp1_data_out,
  // target 2 side
  output logic             tp2_rq_in,
  input  logic             tp2_ack_in,
  output logic [REQ_W-1:0] tp2_data_in,
  input  logic             tp2_rq_out,
  output logic             tp2_ack_out,
  input  logic [RSP_W-1:0] tp2_data_out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic sel;
  assign sel = ip_data_in[SEL_BIT];

  assign tp1_rq_in   = ip_rq_in & sel;
  assign tp2_rq_in   = ip_rq_in & ~sel;
  assign ip_ack_in   = sel ? tp1_ack_in : tp2_ack_in;

  assign ip_rq_out   = sel ? tp1_rq_out : tp2_rq_out;
  assign tp1_ack_out = ip_ack_out & sel;
  assign tp2_ack_out = ip_ack_out & ~sel;
  assign ip_data_out = sel ? tp1_data_out : tp2_data_out;

  assign tp1_data_in = ip_data_in;
  assign tp2_data_in = ip_data_in;
endmodule
