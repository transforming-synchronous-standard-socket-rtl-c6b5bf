// tb_clock_gate_afsm: the controller with a stand-in gated clock (8 ns
// period while clk_en is high). Each round: the input-port request must
// start the clock and be acknowledged only after a rising clock edge; the
// output-port request, raised at a random moment, must be acknowledged with
// the clock low and clk_en low, after which no clock edge may occur.
module tb_clock_gate_afsm;
  timeunit 1ns;
  timeprecision 1ps;

  logic rst_n = 1'b1;  // starts high so the reset at time 0 is a real falling edge

  logic lclk, rq1, ack1, rq2, ack2, clk_en;
  int unsigned checks = 0, failures = 0, n_edges = 0;

  clock_gate_afsm dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial lclk = 1'b0;
  always begin
    wait (clk_en);
    lclk = 1'b1;
    #4;
    lclk = 1'b0;
    #4;
  end
  always @(posedge lclk) n_edges++;

  initial begin
    rst_n = 1'b0; rq1 = 1'b0; rq2 = 1'b0;
    #5;
    rst_n = 1'b1;
    #5;
    check(!clk_en && !ack1 && !ack2, "clock stopped after reset");
    repeat (80) begin
      int unsigned e0;
      e0 = n_edges;
      rq1 = 1'b1;
      #0.5;
      check(clk_en, "rq1 starts the clock");
      wait (ack1);
      check(n_edges > e0, "ack1 only after a rising edge");
      rq1 = 1'b0;
      wait (!ack1);
      check(clk_en, "clock keeps running after ack1-");
      #($urandom_range(40000, 0) * 1ps);
      rq2 = 1'b1;
      wait (ack2);
      check(!clk_en && !lclk, "stopped with the clock low");
      e0 = n_edges;
      #20;
      check(n_edges == e0, "no edges while stopped");
      rq2 = 1'b0;
      wait (!ack2);
      #2;
    end
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
