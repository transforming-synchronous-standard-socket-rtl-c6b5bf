// tb_async_wrapper_target: one target wrapper at its defaults (100 MHz gated
// clock) around a behavioural OCP register-file target. The testbench sends
// random read and write requests over the 4-phase request channel and
// receives the responses on the response channel (acknowledging after 2 ns).
// Checked: each request yields exactly one response, with DVA and, for
// reads, the data last written; the target executes each command once;
// the clock runs at a 10 ns period while busy and is stopped, low, between
// transactions; accept latencies 0 and 5 both occur.
module tb_async_wrapper_target;
  import gals_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned AW = 8, DW = 8;
  localparam int unsigned REQ_W = CMD_W + AW + DW, RSP_W = RESP_W + DW;

  logic rst_n = 1'b1;  // starts high so the reset at time 0 is a real falling edge

  logic lclk, s_cmd_accept, req_rq, req_ack, rsp_rq, rsp_ack;
  ocp_cmd_e         m_cmd;
  ocp_resp_e        s_resp;
  logic [AW-1:0]    m_addr;
  logic [DW-1:0]    m_data, s_data;
  logic [REQ_W-1:0] req_data;
  logic [RSP_W-1:0] rsp_data, rsp_got;
  logic [2:0]       lat;
  int unsigned      n_exec, n_rsp = 0, n_edges = 0, n_lat0 = 0, n_lat5 = 0;
  int unsigned checks = 0, failures = 0;
  realtime          t_prev;

  async_wrapper_target #(.AW(AW), .DW(DW)) dut (.*);

  ocp_target_model #(.AW(AW), .DW(DW)) u_model (
    .clk(lclk), .rst_n, .latency(lat), .m_cmd, .m_addr, .m_data,
    .s_cmd_accept, .s_resp, .s_data, .n_exec);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // Response receiver.
  initial rsp_ack = 1'b0;
  always @(rsp_rq) begin
    if (rsp_rq) begin
      rsp_got = rsp_data;
      n_rsp++;
    end
    #2;
    rsp_ack = rsp_rq;
  end

  always @(posedge lclk) begin
    if (n_edges > 0 && $realtime - t_prev < 10.5)
      check($realtime - t_prev > 9.999, "clock period 10 ns");
    t_prev = $realtime;
    n_edges++;
    if (s_cmd_accept && lat == 3'd0) n_lat0++;
    if (s_cmd_accept && lat == 3'd5) n_lat5++;
  end

  logic [DW-1:0] shadow [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) shadow[i] = '0;
    rst_n = 1'b0; req_rq = 1'b0; req_data = '0; lat = 3'd0;
    #10;
    rst_n = 1'b1;
    #20;
    check(n_edges == 0, "no clock before the first request");
    for (int k = 1; k <= 120; k++) begin
      ocp_cmd_e      c;
      logic [AW-1:0] a;
      logic [DW-1:0] d, e;
      int unsigned   e0;
      c = ($urandom_range(1) == 1) ? CMD_WR : CMD_RD;
      a = AW'($urandom); d = DW'($urandom);
      e = shadow[a];
      if (c == CMD_WR) shadow[a] = d;
      lat = 3'($urandom_range(5));
      req_data = {c, a, d};
      #1;
      req_rq = 1'b1;
      wait (req_ack);
      req_rq = 1'b0;
      wait (!req_ack);
      wait (n_rsp == k);
      check(rsp_got[DW +: RESP_W] == RESP_DVA, "response DVA");
      if (c == CMD_RD) check(rsp_got[DW-1:0] == e, $sformatf("read %0h expected %0h", rsp_got[DW-1:0], e));
      wait (!dut.u_clk.clk_en);
      #1;
      e0 = n_edges;
      #40;
      check(n_edges == e0 && !lclk, "clock stopped between transactions");
      check(n_exec == k, "each command executed once");
    end
    check(n_lat0 > 0 && n_lat5 > 0, "latencies 0 and 5 occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
