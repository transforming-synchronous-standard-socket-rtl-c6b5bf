// mutex_element: behavioural model of a two-input mutual-exclusion element.
//
// Behavioural model, not synthesizable: the real part is a transistor-level
// cross-coupled pair with a metastability filter. Each request r1, r2 gets its
// grant g1, g2 while it stays high; the grants are never high together. A
// request that arrives while the other grant is held waits for it to be
// released. When both requests arrive at the same instant the winner is
// chosen at random, standing in for the real element's metastability
// resolution. Grants follow requests without delay.
module mutex_element (
  input  logic r1,
  input  logic r2,
  output logic g1,
  output logic g2
);
  timeunit 1ns;
  timeprecision 1ps;

  initial begin
    g1 = 1'b0;
    g2 = 1'b0;
  end

  always @(r1 or r2) begin
    if (!r1) g1 = 1'b0;
    if (!r2) g2 = 1'b0;
    if (!g1 && !g2) begin
      if (r1 && r2) begin
        if ($urandom_range(1) == 1) g1 = 1'b1;
        else                        g2 = 1'b1;
      end else if (r1) begin
        g1 = 1'b1;
      end else if (r2) begin
        g2 = 1'b1;
      end
    end
  end

  always @(g1 or g2) begin
    assert (!(g1 && g2)) else $error("mutex_element: both grants high");
  end
endmodule
