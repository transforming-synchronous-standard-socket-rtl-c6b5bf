// tb_splitter_1to2: random stimulus on every input; each output is compared
// with the routing rule worked out here: the select bit (bundle bit SEL_BIT)
// chooses target 1 when 1, target 2 when 0.
module tb_splitter_1to2;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned REQ_W = 19, RSP_W = 10, SEL_BIT = 15;

  logic             ip_rq_in, ip_ack_in, ip_rq_out, ip_ack_out;
  logic [REQ_W-1:0] ip_data_in, tp1_data_in, tp2_data_in;
  logic [RSP_W-1:0] ip_data_out, tp1_data_out, tp2_data_out;
  logic             tp1_rq_in, tp1_ack_in, tp1_rq_out, tp1_ack_out;
  logic             tp2_rq_in, tp2_ack_in, tp2_rq_out, tp2_ack_out;
  int unsigned checks = 0, failures = 0, n_sel [2] = '{0, 0};

  splitter_1to2 #(.REQ_W(REQ_W), .RSP_W(RSP_W), .SEL_BIT(SEL_BIT)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (300) begin
      logic s;
      ip_rq_in     = 1'($urandom_range(1));
      ip_ack_out   = 1'($urandom_range(1));
      ip_data_in   = REQ_W'($urandom);
      tp1_ack_in   = 1'($urandom_range(1));
      tp2_ack_in   = 1'($urandom_range(1));
      tp1_rq_out   = 1'($urandom_range(1));
      tp2_rq_out   = 1'($urandom_range(1));
      tp1_data_out = RSP_W'($urandom);
      tp2_data_out = RSP_W'($urandom);
      #1;
      s = ip_data_in[SEL_BIT];
      n_sel[s]++;
      check(tp1_rq_in == (s && ip_rq_in) && tp2_rq_in == (!s && ip_rq_in), "request strobe");
      check(ip_ack_in == (s ? tp1_ack_in : tp2_ack_in), "request ack");
      check(ip_rq_out == (s ? tp1_rq_out : tp2_rq_out), "response strobe");
      check(tp1_ack_out == (s && ip_ack_out) && tp2_ack_out == (!s && ip_ack_out), "response ack");
      check(ip_data_out == (s ? tp1_data_out : tp2_data_out), "response data");
      check(tp1_data_in == ip_data_in && tp2_data_in == ip_data_in, "request data");
    end
    check(n_sel[0] > 0 && n_sel[1] > 0, "both targets selected");
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
