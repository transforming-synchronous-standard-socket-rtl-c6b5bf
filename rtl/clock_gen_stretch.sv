// clock_gen_stretch: local clock generator whose low phase can be stretched.
//
// Behavioural model (its ring delay is modelled with delays): NPORTS ports
// can each hold the local clock low through a 4-phase handshake rq[i]/ack[i].
// Structure: an inverter ring of STAGES stages produces rise_req, the ring's
// wish to end the current low phase, half a period after each clock edge.
// rise_req meets every port request in a mutual-exclusion element; the AND of
// the clock-side grants and rise_req drive a Muller C element whose output is
// lclk. A port that wins its element before rise_req keeps that element's
// clock-side grant low, so lclk stays low (stretched) until the port drops
// rq; a port that asks while lclk is high waits until it falls. ack[i] high
// therefore means "the clock is low and will stay low".
// The mutual-exclusion elements, AND and C element follow the document; the
// exact polarities and the modelling of the ring as a delay are this
// design's. Half period = STAGES * INV_DELAY_PS (10 ps gives 100 MHz).
module clock_gen_stretch #(
  parameter int unsigned NPORTS       = 1,
  parameter int unsigned STAGES       = 500,
  parameter int unsigned INV_DELAY_PS = 10
) (
  input  logic              rst_n,
  input  logic [NPORTS-1:0] rq,
  output logic [NPORTS-1:0] ack,
  output logic              lclk
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime HALF_NS = real'(STAGES) * real'(INV_DELAY_PS) / 1000.0;

  logic              rise_req;
  logic [NPORTS-1:0] clk_grant;

  for (genvar i = 0; i < NPORTS; i++) begin : g_me
    mutex_element u_me (
      .r1(rq[i]),
      .r2(rise_req),
      .g1(ack[i]),
      .g2(clk_grant[i])
    );
  end

  muller_c u_c (
    .rst_n(rst_n),
    .a    (rise_req),
    .b    (&clk_grant),
    .c    (lclk)
  );

  // Inverter ring: rise_req follows the inverse of lclk half a period later.
  initial rise_req = 1'b0;

  always begin
    #(HALF_NS);
    rise_req = 1'b1;
    wait (lclk);
    #(HALF_NS);
    rise_req = 1'b0;
    wait (!lclk);
  end
endmodule
