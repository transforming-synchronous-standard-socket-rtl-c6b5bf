// tb_transf_sync: a 10 ns clock and a transf_async flag that toggles at
// random instants, 30 to 80 ns apart. Checked: every toggle yields exactly
// one pulse, the pulse is high at exactly one rising clock edge, it never
// changes at a rising edge (it rises only while the clock is low) and it
// falls on a falling edge.
module tb_transf_sync;
  timeunit 1ns;
  timeprecision 1ps;

  logic rst_n = 1'b1;  // starts high so the reset at time 0 is a real falling edge

  logic lclk, transf_async, transf_synch;
  int unsigned checks = 0, failures = 0;
  int unsigned n_toggle = 0, n_pulse = 0, edges_in_pulse = 0;

  transf_sync dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial lclk = 1'b0;
  always #5 lclk = ~lclk;

  always @(posedge lclk) if (transf_synch) edges_in_pulse++;

  always @(posedge transf_synch) begin
    n_pulse++;
    check(!lclk, "pulse rises while the clock is low");
    edges_in_pulse = 0;
  end
  always @(negedge transf_synch) begin
    if (rst_n) begin
      check(!lclk, "pulse falls with the clock low");
      check(edges_in_pulse == 1, $sformatf("pulse spans %0d rising edges", edges_in_pulse));
    end
  end

  initial begin
    rst_n = 1'b0; transf_async = 1'b0;
    #12;
    rst_n = 1'b1;
    repeat (150) begin
      #($urandom_range(80000, 30000) * 1ps);
      transf_async = ~transf_async;
      n_toggle++;
    end
    #40;
    check(n_pulse == n_toggle, $sformatf("%0d pulses for %0d toggles", n_pulse, n_toggle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
