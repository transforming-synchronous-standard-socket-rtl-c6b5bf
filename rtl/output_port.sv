// output_port: poll-type asynchronous output port of a wrapper.
//
// Every edge of port_en (rising, then falling, and so on) sends the bundle on
// data_in once over a 4-phase bundled-data channel: rq+, wait ack+, rq-, wait
// ack-. The synchronous side keeps running meanwhile (poll type); it must hold
// data_in from the enable edge until the next one, which the gaskets do by
// registering the bundle. With CLK_OFF set (target wrappers) the port then
// asks the gated clock generator to stop the local clock, through a second
// 4-phase handshake rq_off/ack_off, because the response has been sent and
// the target is idle until its next request.
//
// The document refers this controller to earlier work; the state graph below
// is this design's, built to match the poll-type input port: an edge-signalled
// enable and one handshake per edge. States {phase, step}: phase says which
// enable level starts the next transfer; step runs IDLE, REQ, REL, and with
// CLK_OFF also OFF, OFFREL. It is a Huffman machine: the state is fed back
// without a clock and the loop is intended. Reset (active low) goes to
// phase 0, IDLE.
module output_port #(
  parameter int unsigned DW      = 10,
  parameter bit          CLK_OFF = 1'b0
) (
  input  logic          rst_n,
  // synchronous side
  input  logic          port_en,
  input  logic [DW-1:0] data_in,
  // asynchronous channel
  output logic          rq,
  input  logic          ack,
  output logic [DW-1:0] data_out,
  // clock-stop handshake with a gated clock generator (used when CLK_OFF)
  output logic          rq_off,
  input  logic          ack_off
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [2:0] {
    IDLE   = 3'd0,
    REQ    = 3'd1,
    REL    = 3'd2,
    OFF    = 3'd3,
    OFFREL = 3'd4
  } step_e;

  typedef struct packed {
    logic  phase;
    step_e step;
  } state_t;

  state_t st, st_next;

  always_comb begin
    st_next = st;
    if (!rst_n) begin
      st_next = '{phase: 1'b0, step: IDLE};
    end else begin
      unique case (st.step)
        IDLE:   if (port_en != st.phase) st_next.step = REQ;
        REQ:    if (ack)                 st_next.step = REL;
        REL:    if (!ack) begin
                  if (CLK_OFF) st_next.step = OFF;
                  else         st_next = '{phase: ~st.phase, step: IDLE};
                end
        OFF:    if (ack_off)             st_next.step = OFFREL;
        OFFREL: if (!ack_off)            st_next = '{phase: ~st.phase, step: IDLE};
        default:                         st_next = '{phase: 1'b0, step: IDLE};
      endcase
    end
  end

  assign st       = st_next;
  assign rq       = (st.step == REQ);
  assign rq_off   = (st.step == OFF);
  assign data_out = data_in;
endmodule
