// gasket_initiator: adapter between an OCP initiator and its asynchronous
// wrapper.
//
// The wrapper's ports are edge-enabled: every edge of port_en starts one
// request transfer (output port) and allows one response transfer (input
// port). The gasket therefore toggles port_en once per OCP command. A command
// is any MCmd other than IDLE. The gasket registers the request bundle
// {MCmd, MAddr, MData} at the same edge, so the bundle, and the address bit
// the central switch routes on, stay stable until the next command.
//
// OCP side: the initiator holds its command until SCmdAccept. SCmdAccept and
// the response (SResp, SData from the input port's latch) are given together,
// for the one cycle in which transf_synch (the synchronized transfer-active
// pulse of the input port) is high, so the initiator sees accept and
// response in the same cycle (OCP sequential mode).
//
// Toggle rule. A toggle flip-flop is driven by "command present and not yet
// sent"; a sent flag is set by the toggle and cleared by transf_synch. The
// document's circuit instead toggles on "command present and (new command or
// transf_synch)"; with a held command that also toggles, at the response
// edge, when the initiator goes idle next, and would send an IDLE request no
// target answers. The sent flag avoids that at the cost of one cycle between
// back-to-back commands. Timing: port_en changes one clock edge after the
// command appears (or one edge after the previous response).
module gasket_initiator
  import gals_pkg::*;
#(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // OCP initiator
  input  ocp_cmd_e                    m_cmd,
  input  logic [AW-1:0]               m_addr,
  input  logic [DW-1:0]               m_data,
  output logic                        s_cmd_accept,
  output ocp_resp_e                   s_resp,
  output logic [DW-1:0]               s_data,
  // wrapper side
  output logic                        port_en,
  output logic [req_w(AW, DW)-1:0]    req_bundle,
  input  logic [rsp_w(DW)-1:0]        rsp_bundle,
  input  logic                        transf_synch
);
  timeunit 1ns;
  timeprecision 1ps;

  logic cmd_active, sent, toggle;

  assign cmd_active = (m_cmd != CMD_IDLE);
  assign toggle     = cmd_active && !sent;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      port_en    <= 1'b0;
      sent       <= 1'b0;
      req_bundle <= '0;
    end else begin
      if (toggle) begin
        port_en    <= ~port_en;
        req_bundle <= {m_cmd, m_addr, m_data};
      end
      sent <= toggle || (sent && !transf_synch);
    end
  end

  assign s_cmd_accept = transf_synch && sent;
  assign s_resp       = s_cmd_accept ? ocp_resp_e'(rsp_bundle[DW +: RESP_W]) : RESP_NULL;
  assign s_data       = rsp_bundle[DW-1:0];

  // A response can only arrive for a command that was sent.
  a_resp_after_send: assert property (@(posedge clk) disable iff (!rst_n)
    transf_synch |-> sent);
endmodule
