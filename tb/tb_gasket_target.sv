// tb_gasket_target: the target gasket on a 10 ns clock, with the testbench
// playing the wrapper (request bundles, transf_synch pulses) and the OCP
// target (SCmdAccept after 0 to 5 cycles, with the response in that cycle).
// Checked: after reset the input port is enabled and the output port not;
// MCmd reaches the target only from the transf_synch edge until the accept
// edge; each accept toggles both port enables once; the response bundle is
// the one given with the accept and stays until the next accept.
module tb_gasket_target;
  import gals_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned AW = 8, DW = 8;

  logic rst_n = 1'b1;  // starts high so the reset at time 0 is a real falling edge

  logic clk, s_cmd_accept, transf_synch, in_port_en, out_port_en;
  ocp_cmd_e        m_cmd;
  ocp_resp_e       s_resp;
  logic [AW-1:0]   m_addr;
  logic [DW-1:0]   m_data, s_data;
  logic [AW+DW+2:0] req_bundle;
  logic [DW+1:0]   rsp_bundle;
  int unsigned checks = 0, failures = 0;

  gasket_target #(.AW(AW), .DW(DW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    logic          q;
    ocp_cmd_e      c;
    logic [AW-1:0] a;
    logic [DW-1:0] d, r;
    rst_n = 1'b0; s_cmd_accept = 1'b0; s_resp = RESP_NULL; s_data = '0;
    transf_synch = 1'b0; req_bundle = '0;
    #1;
    check(!out_port_en && !in_port_en, "both enables low in reset");
    #11;
    rst_n = 1'b1;
    #1;
    check(in_port_en && !out_port_en, "input port enabled after reset");
    q = 1'b0;
    for (int k = 0; k < 100; k++) begin
      int unsigned lat;
      @(negedge clk);
      c = ($urandom_range(1) == 1) ? CMD_WR : CMD_RD;
      a = AW'($urandom); d = DW'($urandom);
      req_bundle = {c, a, d};
      #1;
      check(m_cmd == CMD_IDLE, "command hidden before transf_synch");
      transf_synch = 1'b1;
      @(negedge clk);
      transf_synch = 1'b0;
      check(m_cmd == c && m_addr == a && m_data == d, "command shown after transf_synch");
      lat = $urandom_range(5);
      repeat (lat) begin
        @(negedge clk);
        check(m_cmd == c, "command held until accepted");
        check(out_port_en == q && in_port_en == !q, "enables unchanged while pending");
      end
      r = DW'($urandom);
      s_cmd_accept = 1'b1; s_resp = RESP_DVA; s_data = r;
      @(negedge clk);
      s_cmd_accept = 1'b0; s_resp = RESP_NULL; s_data = '0;
      q = ~q;
      check(out_port_en == q && in_port_en == !q, "accept toggles both enables");
      check(rsp_bundle == {RESP_DVA, r}, "response registered at accept");
      check(m_cmd == CMD_IDLE, "command hidden after accept");
      repeat ($urandom_range(3)) begin
        @(negedge clk);
        check(m_cmd == CMD_IDLE && rsp_bundle == {RESP_DVA, r}, "idle keeps the response");
      end
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
