// async_wrapper_init: asynchronous wrapper of the OCP initiator.
//
// It turns the initiator's synchronous OCP socket into two 4-phase
// bundled-data channels: a request channel (req_*) it drives and a response
// channel (rsp_*) it receives. Inside: gasket_initiator (OCP to port
// enables and bundles), a poll-type output_port for requests, a poll-type
// input_port for responses, transf_sync for the input port's transfer flag,
// and clock_gen_stretch, the initiator's free-running local clock, whose low
// phase the input port stretches while it latches a response. The local
// clock is brought out on lclk to clock the initiator.
// Every OCP command costs one request transfer and one response transfer;
// the initiator sees SCmdAccept and the response in the same cycle.
// This composition (which clock generator the initiator uses, one
// synchronizer) is this design's reading of the document's wrapper and area
// figures.
module async_wrapper_init
  import gals_pkg::*;
#(
  parameter int unsigned AW           = 8,
  parameter int unsigned DW           = 8,
  parameter int unsigned STAGES       = 500,
  parameter int unsigned INV_DELAY_PS = 10
) (
  input  logic                     rst_n,
  output logic                     lclk,
  // OCP initiator socket
  input  ocp_cmd_e                 m_cmd,
  input  logic [AW-1:0]            m_addr,
  input  logic [DW-1:0]            m_data,
  output logic                     s_cmd_accept,
  output ocp_resp_e                s_resp,
  output logic [DW-1:0]            s_data,
  // request channel (out)
  output logic                     req_rq,
  input  logic                     req_ack,
  output logic [req_w(AW,DW)-1:0]  req_data,
  // response channel (in)
  input  logic                     rsp_rq,
  output logic                     rsp_ack,
  input  logic [rsp_w(DW)-1:0]     rsp_data
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned REQ_W = req_w(AW, DW);
  localparam int unsigned RSP_W = rsp_w(DW);

  logic             port_en, transf_active, transf_synch;
  logic             rq_clk, ack_clk;
  logic [REQ_W-1:0] req_bundle;
  logic [RSP_W-1:0] rsp_bundle;
  logic             unused_rq_off;

  gasket_initiator #(.AW(AW), .DW(DW)) u_gasket (
    .clk         (lclk),
    .rst_n       (rst_n),
    .m_cmd       (m_cmd),
    .m_addr      (m_addr),
    .m_data      (m_data),
    .s_cmd_accept(s_cmd_accept),
    .s_resp      (s_resp),
    .s_data      (s_data),
    .port_en     (port_en),
    .req_bundle  (req_bundle),
    .rsp_bundle  (rsp_bundle),
    .transf_synch(transf_synch)
  );

  output_port #(.DW(REQ_W), .CLK_OFF(1'b0)) u_out (
    .rst_n   (rst_n),
    .port_en (port_en),
    .data_in (req_bundle),
    .rq      (req_rq),
    .ack     (req_ack),
    .data_out(req_data),
    .rq_off  (unused_rq_off),
    .ack_off (1'b0)
  );

  input_port #(.DW(RSP_W)) u_in (
    .rst_n        (rst_n),
    .rq           (rsp_rq),
    .ack          (rsp_ack),
    .data_in      (rsp_data),
    .port_en      (port_en),
    .transf_active(transf_active),
    .data_out     (rsp_bundle),
    .rq_clk       (rq_clk),
    .ack_clk      (ack_clk)
  );

  transf_sync u_sync (
    .rst_n       (rst_n),
    .lclk        (lclk),
    .transf_async(transf_active),
    .transf_synch(transf_synch)
  );

  clock_gen_stretch #(
    .NPORTS      (1),
    .STAGES      (STAGES),
    .INV_DELAY_PS(INV_DELAY_PS)
  ) u_clk (
    .rst_n(rst_n),
    .rq   (rq_clk),
    .ack  (ack_clk),
    .lclk (lclk)
  );
endmodule
