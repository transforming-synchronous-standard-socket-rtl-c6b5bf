// tb_output_port: two output ports, one plain and one with the clock-stop
// handshake (CLK_OFF), each enabled by toggling port_en. A receiver stand-in
// acknowledges rq after 3 ns and a clock-generator stand-in acknowledges
// rq_off after 2 ns. Checked: exactly one request per enable edge, none
// while the enable is unchanged, data valid while rq is high, and for the
// clock-stop port exactly one clock-stop request after each completed
// transfer and never during one.
module tb_output_port;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned DW = 10;

  logic rst_n = 1'b1;  // starts high so the reset at time 0 is a real falling edge

  logic en;
  logic [DW-1:0] data;
  logic [1:0]          rq, ack, rq_off, ack_off;
  logic [1:0][DW-1:0]  dout;
  int unsigned checks = 0, failures = 0;
  int unsigned n_rq [2] = '{0, 0}, n_off [2] = '{0, 0};

  output_port #(.DW(DW), .CLK_OFF(1'b0)) dut0 (
    .rst_n, .port_en(en), .data_in(data), .rq(rq[0]), .ack(ack[0]),
    .data_out(dout[0]), .rq_off(rq_off[0]), .ack_off(ack_off[0]));
  output_port #(.DW(DW), .CLK_OFF(1'b1)) dut1 (
    .rst_n, .port_en(en), .data_in(data), .rq(rq[1]), .ack(ack[1]),
    .data_out(dout[1]), .rq_off(rq_off[1]), .ack_off(ack_off[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  for (genvar i = 0; i < 2; i++) begin : g_rx
    initial begin
      ack[i] = 1'b0;
      ack_off[i] = 1'b0;
    end
    always @(rq[i]) begin
      if (rq[i]) begin
        n_rq[i]++;
        check(dout[i] == data, "data valid with rq");
        check(!rq_off[i], "no clock stop during a transfer");
      end
      #3;
      ack[i] = rq[i];
    end
    always @(rq_off[i]) begin
      if (rq_off[i]) n_off[i]++;
      #2;
      ack_off[i] = rq_off[i];
    end
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; data = '0;
    #5;
    rst_n = 1'b1;
    #20;
    check(n_rq[0] == 0 && n_rq[1] == 0, "no request without an enable edge");
    for (int k = 1; k <= 60; k++) begin
      data = DW'($urandom);
      #1;
      en = ~en;
      #30;
      check(n_rq[0] == k && n_rq[1] == k, $sformatf("one request per edge (%0d)", k));
      check(n_off[0] == 0, "plain port never asks to stop the clock");
      check(n_off[1] == k, "clock-stop port asks once per transfer");
      check(!rq[0] && !rq[1] && !rq_off[1] && !ack[0] && !ack[1] && !ack_off[1],
            "handshakes back to zero");
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
