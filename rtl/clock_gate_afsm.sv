// clock_gate_afsm: controller of the gated local clock generator.
//
// It arbitrates between the input port, which asks for the clock to start
// when a transaction arrives (rq1/ack1), and the output port, which asks for
// it to stop once the response has been sent (rq2/ack2). Both are 4-phase
// handshakes. clk_en gates the ring oscillator.
//   0 -(rq1+)-> 1                 : clk_en+
//   1 -(lclk+)-> 2                : ack1+   (the clock is running)
//   2 -(rq1-)-> 3                 : ack1-
//   3 -(rq2+ while lclk low)-> 4  : ack2+, clk_en-
//   4 -(rq2-)-> 0                 : ack2-
// Stopping only while lclk is low keeps the gated clock free of glitches.
// The printed label of transition 3->4 names rq2 falling; a 4-phase request
// must rise first, so this design reads it as rq2 rising.
//
// The state is fed back without a clock (Huffman machine); the loop is
// intended, and hazard-free gates are left to the asynchronous synthesis
// flow. Reset (active low) returns to state 0 with the clock stopped.
module clock_gate_afsm (
  input  logic rst_n,
  input  logic lclk,
  input  logic rq1,
  output logic ack1,
  input  logic rq2,
  output logic ack2,
  output logic clk_en
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [2:0] {
    G0 = 3'd0, G1 = 3'd1, G2 = 3'd2, G3 = 3'd3, G4 = 3'd4
  } state_e;

  state_e st, st_next;

  always_comb begin
    st_next = st;
    if (!rst_n) begin
      st_next = G0;
    end else begin
      unique case (st)
        G0: if (rq1)          st_next = G1;
        G1: if (lclk)         st_next = G2;
        G2: if (!rq1)         st_next = G3;
        G3: if (rq2 && !lclk) st_next = G4;
        G4: if (!rq2)         st_next = G0;
        default:              st_next = G0;
      endcase
    end
  end

  assign st     = st_next;
  assign clk_en = (st == G1) || (st == G2) || (st == G3);
  assign ack1   = (st == G2);
  assign ack2   = (st == G4);
endmodule
