// tb_gals_jtag_sweep: the validation sequence of interleaved accesses to both
// targets (register bank at 100 MHz, SPI controller at 40 MHz) with the
// initiator's clock at 1 MHz, 10 MHz and 100 MHz (ring inverter delays of
// 1000, 100 and 10 ps). Each frame runs NTRANS random commands with random
// latency and gaps and checks every response.
module tb_gals_jtag_sweep;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NTRANS = 60;

  bit          done [3];
  int unsigned chk [3], fail [3], n_iclk [3];
  int unsigned n_tclk [3][2];
  realtime     el [3];

  gals_frame #(.INIT_INV_DELAY_PS(1000), .NTRANS(NTRANS)) f_1mhz (
    .done(done[0]), .checks(chk[0]), .failures(fail[0]), .n_iclk(n_iclk[0]), .n_tclk(n_tclk[0]), .elapsed(el[0]));
  gals_frame #(.INIT_INV_DELAY_PS(100), .NTRANS(NTRANS)) f_10mhz (
    .done(done[1]), .checks(chk[1]), .failures(fail[1]), .n_iclk(n_iclk[1]), .n_tclk(n_tclk[1]), .elapsed(el[1]));
  gals_frame #(.INIT_INV_DELAY_PS(10), .NTRANS(NTRANS)) f_100mhz (
    .done(done[2]), .checks(chk[2]), .failures(fail[2]), .n_iclk(n_iclk[2]), .n_tclk(n_tclk[2]), .elapsed(el[2]));

  initial begin
    int unsigned checks, failures;
    real period;
    wait (done[0] && done[1] && done[2]);
    #200;
    checks = 0; failures = 0;
    for (int i = 0; i < 3; i++) begin
      checks += chk[i];
      failures += fail[i];
      period = el[i] / real'(n_iclk[i]);
      $display("initiator clock %0d MHz: %0d commands in %0.1f us, mean initiator cycle %0.2f ns",
               (i == 0) ? 1 : (i == 1) ? 10 : 100, NTRANS, el[i] / 1000.0, period);
      // The initiator clock must not beat its ring (stretches only add time); 1 %
      // allows for the edge counted at the start of the measurement.
      checks++;
      if (!(period >= ((i == 0) ? 1000.0 : (i == 1) ? 100.0 : 10.0) * 0.99)) begin
        failures++;
        $display("FAIL initiator clock faster than its ring allows");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NTRANS * 20us);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2], fail[0] + fail[1] + fail[2] + 1);
    $finish;
  end
endmodule
