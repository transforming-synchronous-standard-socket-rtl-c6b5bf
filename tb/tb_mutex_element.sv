// tb_mutex_element: random request sequences against the mutual-exclusion
// rules: grants never both high, a grant only while its request is high, a
// lone request is granted at once, and a waiting request is granted as soon
// as the other grant is released.
module tb_mutex_element;
  timeunit 1ns;
  timeprecision 1ps;

  logic r1, r2, g1, g2;
  int unsigned checks = 0, failures = 0, n_wait = 0;

  mutex_element dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    r1 = 1'b0; r2 = 1'b0;
    #1;
    check(!g1 && !g2, "idle");
    repeat (500) begin
      case ($urandom_range(3))
        0: r1 = ~r1;
        1: r2 = ~r2;
        2: begin r1 = ~r1; r2 = ~r2; end
        default: ;
      endcase
      #1;
      check(!(g1 && g2), "exclusive");
      check(!g1 || r1, "g1 only with r1");
      check(!g2 || r2, "g2 only with r2");
      check(g1 || g2 || !(r1 || r2), "some pending request is granted");
      if (r1 && r2) n_wait++;
    end
    check(n_wait > 0, "contention occurred");
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
