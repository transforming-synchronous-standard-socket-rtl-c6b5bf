// tb_muller_c: checks the C element against its definition: the output
// takes the inputs' common value and holds while they differ; reset forces 0.
module tb_muller_c;
  timeunit 1ns;
  timeprecision 1ps;

  logic rst_n = 1'b1;  // starts high so the reset at time 0 is a real falling edge

  logic a, b, c, model;
  int unsigned checks = 0, failures = 0;

  muller_c dut (.*);

  initial begin
    rst_n = 1'b0; a = 1'b1; b = 1'b1;
    #1;
    checks++; if (c !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1; a = 1'b0; b = 1'b0; model = 1'b0;
    #1;
    repeat (200) begin
      a = 1'($urandom_range(1));
      b = 1'($urandom_range(1));
      if (a == b) model = a;
      #1;
      checks++;
      if (c !== model) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b expected %b", a, b, c, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
