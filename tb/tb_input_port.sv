// tb_input_port: drives the poll-type input port through many 4-phase
// transfers. A simple clock-generator stand-in acknowledges rq_clk 2 ns
// later. Each transfer is first attempted with the enable at the wrong
// level (the port must neither ask for the clock nor acknowledge), then the
// enable edge is given. Checked: rq_clk precedes ack, transf_active toggles
// once per transfer, the latch holds the data from ack+ although data_in
// changes, and the handshake returns to zero.
module tb_input_port;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned DW = 19;

  logic rst_n = 1'b1;  // starts high so the reset at time 0 is a real falling edge

  logic rq, ack, port_en, transf_active, rq_clk, ack_clk;
  logic [DW-1:0] data_in, data_out;
  int unsigned checks = 0, failures = 0;

  input_port #(.DW(DW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial ack_clk = 1'b0;
  always @(rq_clk) begin
    #2;
    ack_clk = rq_clk;
  end

  initial begin
    logic          exp_ta;
    logic [DW-1:0] d;
    rst_n = 1'b0; rq = 1'b0; port_en = 1'b0; data_in = '0;
    #5;
    rst_n = 1'b1;
    #5;
    check(!ack && !rq_clk && !transf_active, "idle after reset");
    exp_ta = 1'b0;
    for (int k = 0; k < 100; k++) begin
      d = DW'($urandom);
      data_in = d;
      #1;
      rq = 1'b1;
      #10;
      check(!ack && !rq_clk, "no transfer while the enable has not toggled");
      port_en = ~port_en;
      #1;
      check(rq_clk && !ack, "clock requested before acknowledge");
      wait (ack);
      exp_ta = ~exp_ta;
      check(transf_active == exp_ta, "transf_active toggles once per transfer");
      data_in = ~d;
      #1;
      check(data_out == d, "latched data held after ack");
      rq = 1'b0;
      wait (!ack);
      check(!rq_clk && !ack_clk, "clock handshake returned to zero");
      check(transf_active == exp_ta, "transf_active stable after the transfer");
      #3;
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
