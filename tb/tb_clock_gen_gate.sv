// tb_clock_gen_gate: the gated clock generator at its defaults (500 stages of
// 10 ps, 100 MHz). Per round: rq1 starts the clock, ack1 comes at the first
// rising edge; the clock runs at a 10 ns period for a random number of
// cycles; rq2 stops it, low, and no edge follows until the next rq1.
module tb_clock_gen_gate;
  timeunit 1ns;
  timeprecision 1ps;

  logic rst_n = 1'b1;  // starts high so the reset at time 0 is a real falling edge

  logic rq1, ack1, rq2, ack2, lclk;
  int unsigned checks = 0, failures = 0, n_edges = 0;
  realtime t_prev;

  clock_gen_gate dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(posedge lclk) n_edges++;

  initial begin
    rst_n = 1'b0; rq1 = 1'b0; rq2 = 1'b0;
    #5;
    rst_n = 1'b1;
    #30;
    check(n_edges == 0, "no clock before a request");
    repeat (30) begin
      int unsigned e0, ncyc;
      e0 = n_edges;
      rq1 = 1'b1;
      wait (ack1);
      t_prev = $realtime;
      #0.001;
      check(n_edges == e0 + 1 && lclk, "ack1 at the first rising edge");
      rq1 = 1'b0;
      wait (!ack1);
      ncyc = $urandom_range(6, 1);
      repeat (ncyc) begin
        @(posedge lclk);
        check($realtime - t_prev > 9.999 && $realtime - t_prev < 10.001,
              $sformatf("period %0.3f ns", $realtime - t_prev));
        t_prev = $realtime;
      end
      #($urandom_range(9000) * 1ps);
      rq2 = 1'b1;
      wait (ack2);
      check(!lclk, "stopped low");
      e0 = n_edges;
      rq2 = 1'b0;
      wait (!ack2);
      #50;
      check(n_edges == e0, "no edges while stopped");
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
