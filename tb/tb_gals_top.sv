// tb_gals_top: end-to-end test of the GALS OCP interconnect at its default
// parameters.
//
// A behavioural OCP initiator, clocked by the initiator wrapper's clock,
// issues NTRANS random reads and writes to the two targets (register-file
// models clocked by their gated clocks, each with a random accept latency of
// 0 to 5 cycles). Between commands it inserts 0 to 3 idle cycles, so both
// back-to-back and isolated commands occur. Every response is checked
// against a shadow copy of both register files, and the number of commands
// each target executed against the number sent to it.
// Mechanisms counted (each must happen): initiator clock stretched by a
// response, each target clock started and stopped, back-to-back commands,
// commands after idle cycles, latency 0 and latency 5, reads and writes on
// both targets. It also reports each target's clock activity (clock cycles
// times the ungated period over elapsed time) and checks that it is below 1.
module tb_gals_top;
  import gals_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned AW     = 8;
  localparam int unsigned DW     = 8;
  localparam int unsigned NTRANS = 400;

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

  gals_top dut (.*);

  logic [2:0]  lat [2];
  int unsigned n_exec [2];

  for (genvar i = 0; i < 2; i++) begin : g_model
    ocp_target_model #(.AW(AW), .DW(DW)) u_model (
      .clk         (tgt_clk[i]),
      .rst_n       (rst_n),
      .latency     (lat[i]),
      .m_cmd       (tgt_m_cmd[i]),
      .m_addr      (tgt_m_addr[i]),
      .m_data      (tgt_m_data[i]),
      .s_cmd_accept(tgt_s_cmd_accept[i]),
      .s_resp      (tgt_s_resp[i]),
      .s_data      (tgt_s_data[i]),
      .n_exec      (n_exec[i])
    );
  end

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- behavioural initiator ----------------
  logic [DW-1:0] shadow [2][2**(AW-1)];
  logic [DW-1:0] exp_data;
  ocp_cmd_e      cur_cmd;
  int unsigned   issued, gap_cnt, sent_to [2];
  int unsigned   n_b2b, n_after_idle, n_lat0, n_lat5, n_rd [2], n_wr [2];
  bit            busy, done;

  task automatic issue(input bit back_to_back);
    logic        t;
    logic [AW-2:0] a;
    logic [DW-1:0] d;
    ocp_cmd_e    c;
    t = 1'($urandom_range(1));
    a = (AW-1)'($urandom);
    d = DW'($urandom);
    c = ($urandom_range(1) == 1) ? CMD_WR : CMD_RD;
    lat[t] <= 3'($urandom_range(5));
    if ($urandom_range(5) == 0) lat[t] <= 3'd0;
    if ($urandom_range(5) == 0) lat[t] <= 3'd5;
    init_m_cmd  <= c;
    init_m_addr <= {t, a};
    init_m_data <= d;
    cur_cmd     = c;
    exp_data    = shadow[t][a];
    if (c == CMD_WR) begin
      shadow[t][a] = d;
      n_wr[t]++;
    end else begin
      n_rd[t]++;
    end
    sent_to[t]++;
    issued++;
    if (back_to_back) n_b2b++; else n_after_idle++;
  endtask

  initial begin
    for (int t = 0; t < 2; t++)
      for (int a = 0; a < 2**(AW-1); a++) shadow[t][a] = '0;
    lat[0] = 3'd0;
    lat[1] = 3'd0;
    init_m_cmd  = CMD_IDLE;
    init_m_addr = '0;
    init_m_data = '0;
    issued = 0; gap_cnt = 2; busy = 0; done = 0;
    n_b2b = 0; n_after_idle = 0; n_lat0 = 0; n_lat5 = 0;
    sent_to = '{0, 0}; n_rd = '{0, 0}; n_wr = '{0, 0};
  end

  always @(posedge init_clk) begin
    if (rst_n && !done) begin
      if (busy) begin
        if (init_s_cmd_accept) begin
          check(init_s_resp == RESP_DVA, "response is DVA");
          if (cur_cmd == CMD_RD)
            check(init_s_data == exp_data,
                  $sformatf("read data %0h expected %0h", init_s_data, exp_data));
          if (issued == NTRANS) begin
            init_m_cmd <= CMD_IDLE;
            busy = 0;
            done = 1;
          end else if ($urandom_range(3) == 0) begin
            issue(1'b1);
          end else begin
            init_m_cmd <= CMD_IDLE;
            busy = 0;
            gap_cnt = $urandom_range(2);
          end
        end
      end else if (gap_cnt == 0) begin
        issue(1'b0);
        busy = 1;
      end else begin
        gap_cnt--;
      end
    end
  end

  // Accept latencies actually used by the targets.
  for (genvar i = 0; i < 2; i++) begin : g_lat
    always @(posedge tgt_clk[i]) begin
      if (tgt_s_cmd_accept[i] && lat[i] == 3'd0) n_lat0++;
      if (tgt_s_cmd_accept[i] && lat[i] == 3'd5) n_lat5++;
    end
  end

  // ---------------- mechanism and activity counters ----------------
  int unsigned n_stretch, n_start [2], n_stop [2], n_tclk [2];
  initial begin
    n_stretch = 0; n_start = '{0, 0}; n_stop = '{0, 0}; n_tclk = '{0, 0};
  end
  always @(posedge dut.u_init.ack_clk) n_stretch++;
  always @(posedge dut.g_tgt[0].u_tgt.u_clk.clk_en) if (rst_n) n_start[0]++;
  always @(negedge dut.g_tgt[0].u_tgt.u_clk.clk_en) if (rst_n) n_stop[0]++;
  always @(posedge dut.g_tgt[1].u_tgt.u_clk.clk_en) if (rst_n) n_start[1]++;
  always @(negedge dut.g_tgt[1].u_tgt.u_clk.clk_en) if (rst_n) n_stop[1]++;
  always @(posedge tgt_clk[0]) n_tclk[0]++;
  always @(posedge tgt_clk[1]) n_tclk[1]++;

  realtime t_start;
  real     act [2];

  initial begin
    rst_n = 1'b0;
    #20;
    rst_n = 1'b1;
    t_start = $realtime;
    wait (done);
    #200;
    for (int t = 0; t < 2; t++) begin
      check(n_exec[t] == sent_to[t],
            $sformatf("target %0d executed %0d of %0d", t, n_exec[t], sent_to[t]));
      check(n_rd[t] > 0 && n_wr[t] > 0, $sformatf("target %0d saw reads and writes", t));
      check(n_start[t] > 0 && n_stop[t] == n_start[t],
            $sformatf("target %0d clock started %0d, stopped %0d", t, n_start[t], n_stop[t]));
      check(tgt_clk[t] == 1'b0, $sformatf("target %0d clock stopped at the end", t));
    end
    act[0] = real'(n_tclk[0]) * 10.0 / ($realtime - t_start);
    act[1] = real'(n_tclk[1]) * 25.0 / ($realtime - t_start);
    $display("target activity: t0 %0.3f  t1 %0.3f", act[0], act[1]);
    check(act[0] < 1.0 && act[1] < 1.0, "gated clocks are active less than always");
    check(n_stretch > 0, "initiator clock stretched");
    check(n_b2b > 0, "back-to-back commands");
    check(n_after_idle > 0, "commands after idle cycles");
    check(n_lat0 > 0, "accept latency 0");
    check(n_lat5 > 0, "accept latency 5");
    $display("issued %0d, b2b %0d, after idle %0d, stretch %0d, t0 start/stop %0d/%0d, t1 %0d/%0d",
             issued, n_b2b, n_after_idle, n_stretch, n_start[0], n_stop[0], n_start[1], n_stop[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NTRANS * 1000);
    failures++;
    $display("FAIL: watchdog, %0d of %0d commands issued", issued, NTRANS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
