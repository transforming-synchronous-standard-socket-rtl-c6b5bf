// transf_sync: synchronizer for the input port's transf_active flag.
//
// transf_active (transf_async here) toggles once per received transfer and
// may change at any moment relative to the local clock. This asynchronous
// state machine turns each of its edges into a pulse on transf_synch that is
// high across exactly one rising edge of the local clock, so the synchronous
// side sees a level-based, one-cycle event and never samples a changing
// signal. The pulse rises only while the clock is low and falls on the
// falling edge that follows the next rising edge.
//
// States, as in the specification: 0 and 6 wait for transf_async to rise
// (clock low / clock high), 1-2 hold the pulse through one clock high phase,
// 3 and 7 wait for transf_async to fall (clock low / high), 4-5 hold the
// pulse again. That states 0 and 3 are the clock-low ones, and that a clock
// rise wins over a simultaneous transf_async edge, are this design's reading.
// The state is fed back without a clock (Huffman machine); the loop is
// intended. Reset (active low) returns to state 0.
module transf_sync (
  input  logic rst_n,
  input  logic lclk,
  input  logic transf_async,
  output logic transf_synch
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [2:0] {
    S0 = 3'd0, S1 = 3'd1, S2 = 3'd2, S3 = 3'd3,
    S4 = 3'd4, S5 = 3'd5, S6 = 3'd6, S7 = 3'd7
  } state_e;

  state_e st, st_next;

  always_comb begin
    st_next = st;
    if (!rst_n) begin
      st_next = S0;
    end else begin
      unique case (st)
        S0: if (lclk) st_next = S6; else if (transf_async)  st_next = S1;
        S6: if (!lclk) st_next = S0;
        S1: if (lclk)  st_next = S2;
        S2: if (!lclk) st_next = S3;
        S3: if (lclk) st_next = S7; else if (!transf_async) st_next = S4;
        S7: if (!lclk) st_next = S3;
        S4: if (lclk)  st_next = S5;
        S5: if (!lclk) st_next = S0;
        default:       st_next = S0;
      endcase
    end
  end

  assign st = st_next;
  assign transf_synch = (st == S1) || (st == S2) || (st == S4) || (st == S5);
endmodule
