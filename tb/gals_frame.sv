// gals_frame: the validation frame used by the workload testbenches.
//
// It wraps gals_top with a behavioural OCP initiator and two register-file
// targets (ocp_target_model): target 0 at 100 MHz stands for the register
// bank, target 1 at 40 MHz for the SPI controller. The initiator issues
// NTRANS random reads and writes spread over both targets and checks every
// response against a shadow copy of the register files.
//   BURST = 0: commands at random moments, 0..MAXGAP idle initiator cycles
//              between a response and the next command;
//   BURST = 1: one continuous burst, each command issued in the cycle its
//              predecessor is accepted.
//   LAT < 0:   accept latency random in 0..5 per command; else fixed at LAT.
// Outputs: done, check counts, clock-edge counts of all three local clocks
// and the elapsed time, from which activity factors are computed.
module gals_frame
  import gals_pkg::*;
#(
  parameter int unsigned INIT_INV_DELAY_PS = 10,
  parameter int unsigned NTRANS            = 100,
  parameter bit          BURST             = 1'b0,
  parameter int          LAT               = -1,
  parameter int unsigned MAXGAP            = 3
) (
  output bit          done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned n_iclk,
  output int unsigned n_tclk [2],
  output realtime     elapsed
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned AW = 8, DW = 8;

  logic rst_n = 1'b1;  // starts high so the reset at time 0 is a real falling edge
  logic                    init_clk;
  ocp_cmd_e                init_m_cmd;
  logic [AW-1:0]           init_m_addr;
  logic [DW-1:0]           init_m_data;
  logic                    init_s_cmd_accept;
  ocp_resp_e               init_s_resp;
  logic [DW-1:0]           init_s_data;
  logic      [1:0]         tgt_clk;
  ocp_cmd_e  [1:0]         tgt_m_cmd;
  logic      [1:0][AW-1:0] tgt_m_addr;
  logic      [1:0][DW-1:0] tgt_m_data;
  logic      [1:0]         tgt_s_cmd_accept;
  ocp_resp_e [1:0]         tgt_s_resp;
  logic      [1:0][DW-1:0] tgt_s_data;

  gals_top #(.INIT_INV_DELAY_PS(INIT_INV_DELAY_PS)) u_top (.*);

  logic [2:0]  lat [2];
  int unsigned n_exec [2];

  for (genvar i = 0; i < 2; i++) begin : g_model
    ocp_target_model #(.AW(AW), .DW(DW)) u_model (
      .clk(tgt_clk[i]), .rst_n, .latency(lat[i]), .m_cmd(tgt_m_cmd[i]),
      .m_addr(tgt_m_addr[i]), .m_data(tgt_m_data[i]),
      .s_cmd_accept(tgt_s_cmd_accept[i]), .s_resp(tgt_s_resp[i]),
      .s_data(tgt_s_data[i]), .n_exec(n_exec[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %m %0t: %s", $time, what);
    end
  endtask

  logic [DW-1:0] shadow [2][2**(AW-1)];
  logic [DW-1:0] exp_data;
  ocp_cmd_e      cur_cmd;
  int unsigned   issued, gap_cnt, sent_to [2];
  bit            busy, running;
  realtime       t0;

  task automatic issue();
    logic          t;
    logic [AW-2:0] a;
    logic [DW-1:0] d;
    t = 1'($urandom_range(1));
    a = (AW-1)'($urandom);
    d = DW'($urandom);
    cur_cmd = ($urandom_range(1) == 1) ? CMD_WR : CMD_RD;
    lat[t] <= (LAT < 0) ? 3'($urandom_range(5)) : 3'(LAT);
    init_m_cmd  <= cur_cmd;
    init_m_addr <= {t, a};
    init_m_data <= d;
    exp_data = shadow[t][a];
    if (cur_cmd == CMD_WR) shadow[t][a] = d;
    sent_to[t]++;
    issued++;
  endtask

  initial begin
    for (int t = 0; t < 2; t++)
      for (int a = 0; a < 2**(AW-1); a++) shadow[t][a] = '0;
    lat[0] = 3'd0; lat[1] = 3'd0;
    init_m_cmd = CMD_IDLE; init_m_addr = '0; init_m_data = '0;
    issued = 0; gap_cnt = 0; busy = 0; done = 0; running = 0;
    checks = 0; failures = 0; n_iclk = 0; n_tclk = '{0, 0}; sent_to = '{0, 0};
  end

  always @(posedge init_clk) begin
    if (running && !done) begin
      n_iclk++;
      if (busy) begin
        if (init_s_cmd_accept) begin
          check(init_s_resp == RESP_DVA, "response DVA");
          if (cur_cmd == CMD_RD) check(init_s_data == exp_data, "read data");
          if (issued == NTRANS) begin
            init_m_cmd <= CMD_IDLE;
            busy = 0;
            done = 1;
            elapsed = $realtime - t0;
          end else if (BURST) begin
            issue();
          end else begin
            init_m_cmd <= CMD_IDLE;
            busy = 0;
            gap_cnt = $urandom_range(MAXGAP);
          end
        end
      end else if (gap_cnt == 0) begin
        issue();
        busy = 1;
      end else begin
        gap_cnt--;
      end
    end
  end

  always @(posedge tgt_clk[0]) if (running && !done) n_tclk[0]++;
  always @(posedge tgt_clk[1]) if (running && !done) n_tclk[1]++;

  initial begin
    rst_n = 1'b0;
    #20;
    rst_n = 1'b1;
    @(posedge init_clk);
    t0 = $realtime;
    running = 1;
    wait (done);
    #100;
    for (int t = 0; t < 2; t++)
      check(n_exec[t] == sent_to[t] && sent_to[t] > 0,
            $sformatf("target %0d executed %0d of %0d", t, n_exec[t], sent_to[t]));
  end
endmodule
