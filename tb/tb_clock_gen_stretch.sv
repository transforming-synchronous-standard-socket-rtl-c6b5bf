// tb_clock_gen_stretch: a two-port stretchable clock generator at the default
// ring (500 stages of 10 ps). Unstretched periods must be 10 ns. Requests
// come at random instants on either port: each acknowledge must find the
// clock low, the clock must stay low for as long as any acknowledge is held
// (the hold is made longer than a half period, so the low phase really is
// stretched). Each port has its own mutual-exclusion element against the
// clock, so both ports may hold the clock low at the same time; the test
// checks that this overlap occurs and is handled.
module tb_clock_gen_stretch;
  timeunit 1ns;
  timeprecision 1ps;

  logic rst_n = 1'b1;  // starts high so the reset at time 0 is a real falling edge

  logic lclk;
  logic [1:0] rq, ack;
  int unsigned checks = 0, failures = 0, n_stretched = 0, n_normal = 0;
  realtime t_fall, t_rise, low_time;

  clock_gen_stretch #(.NPORTS(2)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(negedge lclk) t_fall = $realtime;
  always @(posedge lclk) begin
    if (rst_n) check(ack == 2'b00, "clock rises with no acknowledge held");
    t_rise   = $realtime;
    low_time = t_rise - t_fall;
    if (low_time > 5.001) n_stretched++;
    else if (low_time > 4.999) n_normal++;
  end
  int unsigned n_both = 0;
  always @(ack) begin
    if (ack == 2'b11) n_both++;
    if (ack != 2'b00) check(!lclk, "clock low while any acknowledge is held");
  end

  for (genvar i = 0; i < 2; i++) begin : g_port
    initial begin
      rq[i] = 1'b0;
      @(posedge rst_n);
      repeat (60) begin
        #($urandom_range(20000, 1000) * 1ps);
        rq[i] = 1'b1;
        wait (ack[i]);
        check(!lclk, "acknowledge only with the clock low");
        #($urandom_range(9000, 6000) * 1ps);
        check(!lclk, "clock held low while acknowledged");
        rq[i] = 1'b0;
        wait (!ack[i]);
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    #3;
    rst_n = 1'b1;
    #2000;
    check(n_stretched > 0, "low phase stretched");
    check(n_normal > 0, "normal 5 ns low phase");
    check(n_both > 0, "both ports stretching at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
