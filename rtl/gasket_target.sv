// gasket_target: adapter between an OCP target and its asynchronous wrapper.
//
// A toggle flip-flop q, toggled by SCmdAccept, drives the output port enable
// directly and the input port enable through an XOR with the active-low
// reset: after reset the input port is enabled for a request and the output
// port idle; each accepted command starts one response transfer and enables
// the next request.
//
// Request side: the request bundle comes from the input port's latch. A
// pending flag is set by transf_synch (a new request has arrived) and cleared
// by SCmdAccept; MCmd is shown to the target only while it is pending, so a
// command is executed once even though the latch still holds it afterwards.
// Response side: the target gives SResp (and SData) in the cycle it asserts
// SCmdAccept; the gasket registers {SResp, SData} at that edge, so the
// bundle is stable for the output port until the next response.
// The toggle flip-flop and its two enables follow the document; the pending
// flag and the response register are this design's additions.
module gasket_target
  import gals_pkg::*;
#(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // OCP target
  output ocp_cmd_e                    m_cmd,
  output logic [AW-1:0]               m_addr,
  output logic [DW-1:0]               m_data,
  input  logic                        s_cmd_accept,
  input  ocp_resp_e                   s_resp,
  input  logic [DW-1:0]               s_data,
  // wrapper side
  input  logic [req_w(AW, DW)-1:0]    req_bundle,
  input  logic                        transf_synch,
  output logic                        in_port_en,
  output logic                        out_port_en,
  output logic [rsp_w(DW)-1:0]        rsp_bundle
);
  timeunit 1ns;
  timeprecision 1ps;

  logic q, pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q          <= 1'b0;
      pending    <= 1'b0;
      rsp_bundle <= '0;
    end else begin
      if (s_cmd_accept) begin
        q          <= ~q;
        rsp_bundle <= {s_resp, s_data};
      end
      pending <= transf_synch || (pending && !s_cmd_accept);
    end
  end

  assign out_port_en = q;
  assign in_port_en  = q ^ rst_n;

  assign m_cmd  = pending ? ocp_cmd_e'(req_bundle[AW+DW +: CMD_W]) : CMD_IDLE;
  assign m_addr = req_bundle[DW +: AW];
  assign m_data = req_bundle[DW-1:0];

  // The target may accept only a command it has been shown.
  a_accept_pending: assert property (@(posedge clk) disable iff (!rst_n)
    s_cmd_accept |-> pending);
endmodule
