// tb_async_wrapper_init: the initiator wrapper at its defaults (100 MHz
// stretchable clock). A behavioural OCP initiator issues random reads and
// writes, back to back or after idle cycles; the testbench plays the far side
// of the two channels: it acknowledges each request after 2 ns, applies it
// to a register file, and after a random 5-40 ns returns the response on the
// response channel. Checked: one request per command with the command's
// bundle; SCmdAccept once per command with DVA and correct read data; the
// clock is low whenever the input port holds its clock grant (stretch),
// and stretching happens.
module tb_async_wrapper_init;
  import gals_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned AW = 8, DW = 8, NCMD = 150;
  localparam int unsigned REQ_W = CMD_W + AW + DW, RSP_W = RESP_W + DW;

  logic rst_n = 1'b1;  // starts high so the reset at time 0 is a real falling edge

  logic lclk, s_cmd_accept, req_rq, req_ack, rsp_rq, rsp_ack;
  ocp_cmd_e         m_cmd;
  ocp_resp_e        s_resp;
  logic [AW-1:0]    m_addr;
  logic [DW-1:0]    m_data, s_data;
  logic [REQ_W-1:0] req_data;
  logic [RSP_W-1:0] rsp_data;
  int unsigned checks = 0, failures = 0, n_req = 0, n_acc = 0, n_stretch = 0, n_b2b = 0;

  async_wrapper_init #(.AW(AW), .DW(DW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // Far side: register file behind the two channels.
  logic [DW-1:0] regs [2**AW];
  initial begin
    for (int i = 0; i < 2**AW; i++) regs[i] = '0;
    req_ack = 1'b0; rsp_rq = 1'b0; rsp_data = '0;
    forever begin
      logic [REQ_W-1:0] r;
      wait (req_rq);
      r = req_data;
      n_req++;
      check(r == {cur_cmd, cur_addr, cur_data}, "request bundle is the command");
      #2 req_ack = 1'b1;
      wait (!req_rq);
      #2 req_ack = 1'b0;
      #($urandom_range(40000, 5000) * 1ps);
      if (ocp_cmd_e'(r[AW+DW +: CMD_W]) == CMD_WR) begin
        regs[r[DW +: AW]] = r[DW-1:0];
        rsp_data = {RESP_DVA, DW'(0)};
      end else begin
        rsp_data = {RESP_DVA, regs[r[DW +: AW]]};
      end
      #1 rsp_rq = 1'b1;
      wait (rsp_ack);
      #2 rsp_rq = 1'b0;
      wait (!rsp_ack);
    end
  end

  always @(posedge dut.ack_clk) begin
    n_stretch++;
    check(!lclk, "clock low when the input port is granted");
  end
  always @(posedge lclk) check(!dut.ack_clk, "no rising edge during a stretch");

  // OCP initiator.
  logic [DW-1:0] shadow [2**AW];
  logic [DW-1:0] exp_data;
  ocp_cmd_e      cur_cmd;
  logic [AW-1:0] cur_addr;
  logic [DW-1:0] cur_data;
  int unsigned   issued = 0, gap = 2;
  bit            busy = 0, done = 0;

  task automatic issue();
    cur_cmd  = ($urandom_range(1) == 1) ? CMD_WR : CMD_RD;
    cur_addr = AW'($urandom);
    cur_data = DW'($urandom);
    exp_data = shadow[cur_addr];
    if (cur_cmd == CMD_WR) shadow[cur_addr] = cur_data;
    m_cmd  <= cur_cmd;
    m_addr <= cur_addr;
    m_data <= cur_data;
    issued++;
  endtask

  initial begin
    for (int i = 0; i < 2**AW; i++) shadow[i] = '0;
    m_cmd = CMD_IDLE; m_addr = '0; m_data = '0;
  end

  always @(posedge lclk) begin
    if (rst_n && !done) begin
      if (busy) begin
        if (s_cmd_accept) begin
          n_acc++;
          check(s_resp == RESP_DVA, "DVA");
          if (cur_cmd == CMD_RD) check(s_data == exp_data, "read data");
          if (issued == NCMD) begin
            m_cmd <= CMD_IDLE; busy = 0; done = 1;
          end else if ($urandom_range(2) == 0) begin
            issue(); n_b2b++;
          end else begin
            m_cmd <= CMD_IDLE; busy = 0; gap = $urandom_range(3);
          end
        end
      end else if (gap == 0) begin
        issue(); busy = 1;
      end else begin
        gap--;
      end
    end
  end

  initial begin
    rst_n = 1'b0;
    #10;
    rst_n = 1'b1;
    wait (done);
    #100;
    check(n_req == NCMD && n_acc == NCMD, $sformatf("%0d requests, %0d accepts", n_req, n_acc));
    check(n_stretch == NCMD, "one stretch per response");
    check(n_b2b > 0, "back-to-back commands");
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
