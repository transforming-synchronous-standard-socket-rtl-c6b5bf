// ocp_target_model: behavioural OCP basic-interface target used by the
// testbenches in place of the register bank and the SPI controller.
//
// It holds a 2**AW-byte register file. A command (MCmd not IDLE) is accepted
// after `latency` further cycles: SCmdAccept is high in the cycle the command
// has been presented for latency+1 cycles, with the response (DVA, and the
// read data for a read) in that same cycle. Writes update the register file
// at the accepting edge. It counts the commands it executed.
module ocp_target_model
  import gals_pkg::*;
#(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [2:0]    latency,
  input  ocp_cmd_e      m_cmd,
  input  logic [AW-1:0] m_addr,
  input  logic [DW-1:0] m_data,
  output logic          s_cmd_accept,
  output ocp_resp_e     s_resp,
  output logic [DW-1:0] s_data,
  output int unsigned   n_exec
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [DW-1:0] regs [2**AW];
  logic [2:0]    cnt;

  initial begin
    for (int i = 0; i < 2**AW; i++) regs[i] = '0;
  end

  assign s_cmd_accept = (m_cmd != CMD_IDLE) && (cnt == latency);
  assign s_resp       = s_cmd_accept ? RESP_DVA : RESP_NULL;
  assign s_data       = (s_cmd_accept && m_cmd == CMD_RD) ? regs[m_addr] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      n_exec <= 0;
    end else if (s_cmd_accept) begin
      cnt    <= '0;
      n_exec <= n_exec + 1;
      if (m_cmd == CMD_WR) regs[m_addr] <= m_data;
    end else if (m_cmd != CMD_IDLE) begin
      cnt <= cnt + 3'd1;
    end
  end
endmodule
