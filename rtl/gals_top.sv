// gals_top: GALS version of a one-initiator, two-target OCP socket design.
//
// Each synchronous OCP module keeps its own socket and gets its own locally
// generated clock; all communication between them runs over 4-phase
// bundled-data channels through a combinational asynchronous central switch.
//   - async_wrapper_init wraps the initiator: a free-running clock whose low
//     phase is stretched while a response is latched.
//   - async_wrapper_target, one per target: a clock that starts when a
//     request arrives and stops once the response has been sent.
//   - async_switch routes each request by the most significant address bit
//     (target 0 below 2**(AW-1), target 1 above) and the response back.
// The synchronous modules themselves (initiator and targets) sit outside:
// their OCP sockets and the clocks generated for them are this module's
// ports. Default clock rates: initiator and target 0 at 100 MHz, target 1 at
// 40 MHz (STAGES inverters of INV_DELAY_PS each per half period).
// OCP widths of 8 address and 8 data bits follow the document.
module gals_top
  import gals_pkg::*;
#(
  parameter int unsigned AW              = 8,
  parameter int unsigned DW              = 8,
  parameter int unsigned STAGES          = 500,
  parameter int unsigned INIT_INV_DELAY_PS = 10,
  parameter int unsigned T0_INV_DELAY_PS = 10,
  parameter int unsigned T1_INV_DELAY_PS = 25
) (
  input  logic                rst_n,
  // initiator socket and its clock
  output logic                init_clk,
  input  ocp_cmd_e            init_m_cmd,
  input  logic [AW-1:0]       init_m_addr,
  input  logic [DW-1:0]       init_m_data,
  output logic                init_s_cmd_accept,
  output ocp_resp_e           init_s_resp,
  output logic [DW-1:0]       init_s_data,
  // target sockets and their clocks
  output logic      [1:0]         tgt_clk,
  output ocp_cmd_e  [1:0]         tgt_m_cmd,
  output logic      [1:0][AW-1:0] tgt_m_addr,
  output logic      [1:0][DW-1:0] tgt_m_data,
  input  logic      [1:0]         tgt_s_cmd_accept,
  input  ocp_resp_e [1:0]         tgt_s_resp,
  input  logic      [1:0][DW-1:0] tgt_s_data
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NT    = 2;
  localparam int unsigned REQ_W = req_w(AW, DW);
  localparam int unsigned RSP_W = rsp_w(DW);

  logic             ip_rq_in, ip_ack_in, ip_rq_out, ip_ack_out;
  logic [REQ_W-1:0] ip_data_in;
  logic [RSP_W-1:0] ip_data_out;

  logic [NT-1:0]            tp_rq_in, tp_ack_in, tp_rq_out, tp_ack_out;
  logic [NT-1:0][REQ_W-1:0] tp_data_in;
  logic [NT-1:0][RSP_W-1:0] tp_data_out;

  async_wrapper_init #(
    .AW(AW), .DW(DW), .STAGES(STAGES), .INV_DELAY_PS(INIT_INV_DELAY_PS)
  ) u_init (
    .rst_n       (rst_n),
    .lclk        (init_clk),
    .m_cmd       (init_m_cmd),
    .m_addr      (init_m_addr),
    .m_data      (init_m_data),
    .s_cmd_accept(init_s_cmd_accept),
    .s_resp      (init_s_resp),
    .s_data      (init_s_data),
    .req_rq      (ip_rq_in),
    .req_ack     (ip_ack_in),
    .req_data    (ip_data_in),
    .rsp_rq      (ip_rq_out),
    .rsp_ack     (ip_ack_out),
    .rsp_data    (ip_data_out)
  );

  async_switch #(
    .NT(NT), .REQ_W(REQ_W), .RSP_W(RSP_W), .ADDR_MSB(DW + AW - 1)
  ) u_switch (
    .ip_rq_in   (ip_rq_in),
    .ip_ack_in  (ip_ack_in),
    .ip_data_in (ip_data_in),
    .ip_rq_out  (ip_rq_out),
    .ip_ack_out (ip_ack_out),
    .ip_data_out(ip_data_out),
    .tp_rq_in   (tp_rq_in),
    .tp_ack_in  (tp_ack_in),
    .tp_data_in (tp_data_in),
    .tp_rq_out  (tp_rq_out),
    .tp_ack_out (tp_ack_out),
    .tp_data_out(tp_data_out)
  );

  for (genvar i = 0; i < NT; i++) begin : g_tgt
    localparam int unsigned DLY = (i == 0) ? T0_INV_DELAY_PS : T1_INV_DELAY_PS;
    async_wrapper_target #(
      .AW(AW), .DW(DW), .STAGES(STAGES), .INV_DELAY_PS(DLY)
    ) u_tgt (
      .rst_n       (rst_n),
      .lclk        (tgt_clk[i]),
      .m_cmd       (tgt_m_cmd[i]),
      .m_addr      (tgt_m_addr[i]),
      .m_data      (tgt_m_data[i]),
      .s_cmd_accept(tgt_s_cmd_accept[i]),
      .s_resp      (tgt_s_resp[i]),
      .s_data      (tgt_s_data[i]),
      .req_rq      (tp_rq_in[i]),
      .req_ack     (tp_ack_in[i]),
      .req_data    (tp_data_in[i]),
      .rsp_rq      (tp_rq_out[i]),
      .rsp_ack     (tp_ack_out[i]),
      .rsp_data    (tp_data_out[i])
    );
  end
endmodule
