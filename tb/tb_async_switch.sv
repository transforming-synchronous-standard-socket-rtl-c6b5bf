// tb_async_switch: a four-target switch (a two-level tree of three
// splitters) driven with random stimulus. For each vector the target named
// by the top two address bits must get the request strobe and acknowledge
// and be the source of the response; all other targets stay quiet.
module tb_async_switch;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NT = 4, REQ_W = 19, RSP_W = 10, ADDR_MSB = 15;

  logic             ip_rq_in, ip_ack_in, ip_rq_out, ip_ack_out;
  logic [REQ_W-1:0] ip_data_in;
  logic [RSP_W-1:0] ip_data_out;
  logic [NT-1:0]            tp_rq_in, tp_ack_in, tp_rq_out, tp_ack_out;
  logic [NT-1:0][REQ_W-1:0] tp_data_in;
  logic [NT-1:0][RSP_W-1:0] tp_data_out;
  int unsigned checks = 0, failures = 0, n_hit [NT] = '{0, 0, 0, 0};

  async_switch #(.NT(NT), .REQ_W(REQ_W), .RSP_W(RSP_W), .ADDR_MSB(ADDR_MSB)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (400) begin
      int unsigned t;
      ip_rq_in   = 1'($urandom_range(1));
      ip_ack_out = 1'($urandom_range(1));
      ip_data_in = REQ_W'($urandom);
      tp_ack_in  = NT'($urandom);
      tp_rq_out  = NT'($urandom);
      for (int i = 0; i < NT; i++) tp_data_out[i] = RSP_W'($urandom);
      #1;
      t = ip_data_in[ADDR_MSB -: 2];
      n_hit[t]++;
      for (int i = 0; i < NT; i++) begin
        check(tp_rq_in[i] == (i == t && ip_rq_in), $sformatf("request strobe %0d", i));
        check(tp_ack_out[i] == (i == t && ip_ack_out), $sformatf("response ack %0d", i));
        check(tp_data_in[i] == ip_data_in, $sformatf("request data %0d", i));
      end
      check(ip_ack_in == tp_ack_in[t], "request ack");
      check(ip_rq_out == tp_rq_out[t], "response strobe");
      check(ip_data_out == tp_data_out[t], "response data");
    end
    for (int i = 0; i < NT; i++) check(n_hit[i] > 0, $sformatf("target %0d reached", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
