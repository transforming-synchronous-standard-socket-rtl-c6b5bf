// input_port: poll-type asynchronous input port of a wrapper.
//
// The port receives a 4-phase bundled-data channel (rq, ack, data_in) from
// the asynchronous side and hands it to the locally synchronous module. Its
// controller is an asynchronous state machine of eight states that follows
// the poll-type input port specification state by state:
//   0 -(rq+ and port_en high)-> 1 : rq_clk+        (ask the clock generator)
//   1 -(ack_clk+)-> 2             : ack+, transf_active+
//   2 -(rq-)-> 3                  : rq_clk-
//   3 -(ack_clk-)-> 4             : ack-
//   4 -(rq+ and port_en low)-> 5  : rq_clk+
//   5 -(ack_clk+)-> 6             : ack+, transf_active-
//   6 -(rq-)-> 7                  : rq_clk-
//   7 -(ack_clk-)-> 0             : ack-
// So port_en is an edge-signalled enable: every edge enables one transfer, and
// transf_active toggles once per transfer. rq_clk/ack_clk is a 4-phase
// handshake with the local clock generator, which grants it only while the
// local clock is held low (stretched or stopped), so the latch closes and
// transf_active changes when no clock edge can sample them.
// The data latch is transparent while ack is low and holds from ack+ on.
//
// Implementation: the three outputs {rq_clk, ack, transf_active} are distinct
// in all eight states, so they are the state vector itself (a Huffman
// machine: next-state logic fed back without a clock). The resulting
// combinational feedback loop and the data latch are intended. Hazard-free
// gate-level logic for the loop is left to the asynchronous synthesis flow;
// this RTL fixes the state graph. Reset (active low) returns to state 0.
module input_port #(
  parameter int unsigned DW = 19
) (
  input  logic          rst_n,
  // asynchronous channel
  input  logic          rq,
  output logic          ack,
  input  logic [DW-1:0] data_in,
  // synchronous side
  input  logic          port_en,
  output logic          transf_active,
  output logic [DW-1:0] data_out,
  // clock generator handshake
  output logic          rq_clk,
  input  logic          ack_clk
);
  timeunit 1ns;
  timeprecision 1ps;

  // State encoding = {rq_clk, ack, transf_active}.
  typedef enum logic [2:0] {
    S0 = 3'b000, S1 = 3'b100, S2 = 3'b111, S3 = 3'b011,
    S4 = 3'b001, S5 = 3'b101, S6 = 3'b110, S7 = 3'b010
  } state_e;

  state_e st, st_next;

  always_comb begin
    st_next = st;
    if (!rst_n) begin
      st_next = S0;
    end else begin
      unique case (st)
        S0: if (rq && port_en)  st_next = S1;
        S1: if (ack_clk)        st_next = S2;
        S2: if (!rq)            st_next = S3;
        S3: if (!ack_clk)       st_next = S4;
        S4: if (rq && !port_en) st_next = S5;
        S5: if (ack_clk)        st_next = S6;
        S6: if (!rq)            st_next = S7;
        S7: if (!ack_clk)       st_next = S0;
        default:                st_next = S0;
      endcase
    end
  end

  assign st = st_next;
  assign {rq_clk, ack, transf_active} = st;

  always_latch begin
    if (!ack) data_out = data_in;
  end
endmodule
