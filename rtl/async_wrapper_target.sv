// async_wrapper_target: asynchronous wrapper of an OCP target.
//
// It receives OCP requests on a 4-phase bundled-data channel (req_*) and
// returns responses on another (rsp_*). Inside: a poll-type input_port whose
// clock request starts the gated clock generator (clock_gen_gate), so the
// target's clock runs only from the arrival of a request until its response
// has been sent; transf_sync to mark the new request in the target's clock
// domain; gasket_target (port enables, command qualification, response
// register); and an output_port that sends the response and then asks the
// clock generator to stop the clock.
// The local clock is brought out on lclk to clock the target; it stays low
// between transactions.
module async_wrapper_target
  import gals_pkg::*;
#(
  parameter int unsigned AW           = 8,
  parameter int unsigned DW           = 8,
  parameter int unsigned STAGES       = 500,
  parameter int unsigned INV_DELAY_PS = 10
) (
  input  logic                     rst_n,
  output logic                     lclk,
  // OCP target socket
  output ocp_cmd_e                 m_cmd,
  output logic [AW-1:0]            m_addr,
  output logic [DW-1:0]            m_data,
  input  logic                     s_cmd_accept,
  input  ocp_resp_e                s_resp,
  input  logic [DW-1:0]            s_data,
  // request channel (in)
  input  logic                     req_rq,
  output logic                     req_ack,
  input  logic [req_w(AW,DW)-1:0]  req_data,
  // response channel (out)
  output logic                     rsp_rq,
  input  logic                     rsp_ack,
  output logic [rsp_w(DW)-1:0]     rsp_data
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned REQ_W = req_w(AW, DW);
  localparam int unsigned RSP_W = rsp_w(DW);

  logic             in_port_en, out_port_en, transf_active, transf_synch;
  logic             rq1, ack1, rq2, ack2;
  logic [REQ_W-1:0] req_bundle;
  logic [RSP_W-1:0] rsp_bundle;

  input_port #(.DW(REQ_W)) u_in (
    .rst_n        (rst_n),
    .rq           (req_rq),
    .ack          (req_ack),
    .data_in      (req_data),
    .port_en      (in_port_en),
    .transf_active(transf_active),
    .data_out     (req_bundle),
    .rq_clk       (rq1),
    .ack_clk      (ack1)
  );

  transf_sync u_sync (
    .rst_n       (rst_n),
    .lclk        (lclk),
    .transf_async(transf_active),
    .transf_synch(transf_synch)
  );

  gasket_target #(.AW(AW), .DW(DW)) u_gasket (
    .clk         (lclk),
    .rst_n       (rst_n),
    .m_cmd       (m_cmd),
    .m_addr      (m_addr),
    .m_data      (m_data),
    .s_cmd_accept(s_cmd_accept),
    .s_resp      (s_resp),
    .s_data      (s_data),
    .req_bundle  (req_bundle),
    .transf_synch(transf_synch),
    .in_port_en  (in_port_en),
    .out_port_en (out_port_en),
    .rsp_bundle  (rsp_bundle)
  );

  output_port #(.DW(RSP_W), .CLK_OFF(1'b1)) u_out (
    .rst_n   (rst_n),
    .port_en (out_port_en),
    .data_in (rsp_bundle),
    .rq      (rsp_rq),
    .ack     (rsp_ack),
    .data_out(rsp_data),
    .rq_off  (rq2),
    .ack_off (ack2)
  );

  clock_gen_gate #(
    .STAGES      (STAGES),
    .INV_DELAY_PS(INV_DELAY_PS)
  ) u_clk (
    .rst_n(rst_n),
    .rq1  (rq1),
    .ack1 (ack1),
    .rq2  (rq2),
    .ack2 (ack2),
    .lclk (lclk)
  );
endmodule
