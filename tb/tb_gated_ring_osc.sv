// tb_gated_ring_osc: with the default 500 stages of 10 ps the period must be
// 10 ns (100 MHz) while en is high; en dropped while the clock is low must
// stop it, low, and raising en again must restart it at once.
module tb_gated_ring_osc;
  timeunit 1ns;
  timeprecision 1ps;

  logic en, clk;
  int unsigned checks = 0, failures = 0, n_edges = 0;
  realtime t_last, period;

  gated_ring_osc dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(posedge clk) begin
    if (n_edges > 0) period = $realtime - t_last;
    t_last = $realtime;
    n_edges++;
  end

  initial begin
    en = 1'b0;
    #20;
    check(n_edges == 0 && !clk, "no clock while disabled");
    repeat (10) begin
      int unsigned e0;
      en = 1'b1;
      #0.001;
      check(clk, "clock rises when enabled");
      repeat (5) begin
        @(posedge clk);
        if (n_edges > 1) check(period > 9.999 && period < 10.001, $sformatf("period %0.3f ns", period));
      end
      @(negedge clk);
      #1;
      en = 1'b0;
      e0 = n_edges;
      #30;
      check(n_edges == e0 && !clk, "stopped low");
      n_edges = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
