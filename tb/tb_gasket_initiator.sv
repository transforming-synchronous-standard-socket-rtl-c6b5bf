// tb_gasket_initiator: the initiator gasket on a 10 ns clock, with the
// testbench playing both the OCP initiator and the wrapper's input side
// (transf_synch pulses and response bundles). Commands are held until
// accepted, with and without idle cycles between them. Checked: port_en
// toggles exactly once per command, one edge after the command appears (or
// after the previous accept); the request bundle is the command; no accept
// or response is shown before transf_synch; in the transf_synch cycle
// SCmdAccept is high and SResp/SData carry the response bundle.
module tb_gasket_initiator;
  import gals_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned AW = 8, DW = 8;

  logic rst_n = 1'b1;  // starts high so the reset at time 0 is a real falling edge

  logic clk, s_cmd_accept, port_en, transf_synch;
  ocp_cmd_e        m_cmd;
  ocp_resp_e       s_resp;
  logic [AW-1:0]   m_addr;
  logic [DW-1:0]   m_data, s_data;
  logic [AW+DW+2:0] req_bundle;
  logic [DW+1:0]   rsp_bundle;
  int unsigned checks = 0, failures = 0, n_b2b = 0;

  gasket_initiator #(.AW(AW), .DW(DW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    logic        pe, b2b;
    ocp_cmd_e    c;
    logic [AW-1:0] a;
    logic [DW-1:0] d, r;
    rst_n = 1'b0; m_cmd = CMD_IDLE; m_addr = '0; m_data = '0;
    transf_synch = 1'b0; rsp_bundle = '0;
    #12;
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!port_en, "no toggle while idle");
    pe = 1'b0;
    b2b = 1'b0;
    for (int k = 0; k < 100; k++) begin
      if (!b2b) begin
        @(posedge clk);
        c = ($urandom_range(1) == 1) ? CMD_WR : CMD_RD;
        a = AW'($urandom); d = DW'($urandom);
        m_cmd <= c; m_addr <= a; m_data <= d;
      end
      if (!b2b) begin
        @(negedge clk);
        check(port_en == pe, "no toggle in the cycle the command appears");
      end
      @(negedge clk);
      pe = ~pe;
      check(port_en == pe, "one toggle per command");
      check(req_bundle == {c, a, d}, "request bundle");
      repeat ($urandom_range(4)) begin
        @(negedge clk);
        check(port_en == pe, "held command does not toggle again");
        check(!s_cmd_accept && s_resp == RESP_NULL, "no accept before the response");
      end
      r = DW'($urandom);
      transf_synch = 1'b1;
      rsp_bundle   = {RESP_DVA, r};
      #1;
      check(s_cmd_accept && s_resp == RESP_DVA && s_data == r, "accept and response");
      b2b = ($urandom_range(2) == 0);
      @(posedge clk);
      if (b2b) begin
        n_b2b++;
        c = ($urandom_range(1) == 1) ? CMD_WR : CMD_RD;
        a = AW'($urandom); d = DW'($urandom);
        m_cmd <= c; m_addr <= a; m_data <= d;
      end else begin
        m_cmd <= CMD_IDLE;
      end
      @(negedge clk);
      transf_synch = 1'b0;
      rsp_bundle   = {RESP_NULL, DW'(0)};
      if (!b2b) begin
        repeat ($urandom_range(3)) begin
          @(negedge clk);
          check(port_en == pe, "no toggle while idle");
        end
      end
    end
    check(n_b2b > 0, "back-to-back commands occurred");
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
