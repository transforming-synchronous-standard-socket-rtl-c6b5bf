// tb_gals_power: the four traffic cases of the power estimate, run on the
// validation frame (register bank at 100 MHz, SPI controller at 40 MHz) with
// the initiator (JTAG-port master) at 100 MHz and again at 10 MHz:
//   random commands (0..20 idle initiator cycles between them) or one
//   continuous burst, each with accept latency 0 or 5 target cycles.
// For each case every response is checked, and the activity factor of each
// module is computed as its clock cycles times its ungated clock period over
// the elapsed time. The estimated dynamic-power reduction against a fully
// clocked design is 1 - sum(area share x activity), with area shares 17.6 %
// (initiator), 48.4 % (SPI controller) and 34 % (register bank).
// Checked: every case saves power and stays below the 82.4 % bound set by the
// free-running initiator; latency 5 saves less than latency 0; a burst saves
// less than random traffic; a slower initiator saves more. Reference
// estimates for the four cases are 81 %, 64 %, 76 % and 53 %; the absolute
// values depend on the traffic density and the initiator clock, and are only
// printed.
module tb_gals_power;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NTRANS = 150;
  localparam int unsigned NCASE  = 8;
  // case c: bit 0 = latency 5, bit 1 = burst, bit 2 = initiator at 10 MHz
  localparam int unsigned INIT_PS [2] = '{10, 100};

  bit          done [NCASE];
  int unsigned chk [NCASE], fail [NCASE], n_iclk [NCASE];
  int unsigned n_tclk [NCASE][2];
  realtime     el [NCASE];

  for (genvar c = 0; c < NCASE; c++) begin : g_case
    gals_frame #(
      .INIT_INV_DELAY_PS (INIT_PS[c / 4]),
      .NTRANS            (NTRANS),
      .BURST             (1'((c / 2) % 2)),
      .LAT               ((c % 2) * 5),
      .MAXGAP            (20)
    ) u_frame (
      .done(done[c]), .checks(chk[c]), .failures(fail[c]), .n_iclk(n_iclk[c]),
      .n_tclk(n_tclk[c]), .elapsed(el[c]));
  end

  int unsigned checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit all_done();
    foreach (done[c]) if (!done[c]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    real a_init, a_rb, a_spi;
    real red [NCASE];
    string name;
    while (!all_done()) #100;
    #200;
    for (int c = 0; c < NCASE; c++) begin
      checks += chk[c];
      failures += fail[c];
      a_init = real'(n_iclk[c])    * (real'(INIT_PS[c / 4]) * 500.0 * 2.0 / 1000.0) / el[c];
      a_rb   = real'(n_tclk[c][0]) * 10.0 / el[c];
      a_spi  = real'(n_tclk[c][1]) * 25.0 / el[c];
      red[c] = 100.0 * (1.0 - (0.176 * a_init + 0.484 * a_spi + 0.34 * a_rb));
      name = $sformatf("%0s %-6s latency %0d", (c / 4) ? " 10 MHz" : "100 MHz",
                       ((c / 2) % 2) ? "burst," : "random,", (c % 2) * 5);
      $display("%s  activity: initiator %0.3f, register bank %0.3f, SPI %0.3f -> power reduction %0.1f %%",
               name, a_init, a_rb, a_spi, red[c]);
      check(red[c] > 0.0 && red[c] < 82.5, $sformatf("%s: reduction in range", name));
    end
    for (int k = 0; k < NCASE; k += 4) begin
      check(red[k+1] < red[k],   "random: latency 5 saves less than latency 0");
      check(red[k+3] < red[k+2], "burst: latency 5 saves less than latency 0");
      check(red[k+2] < red[k],   "latency 0: burst saves less than random");
      check(red[k+3] < red[k+1], "latency 5: burst saves less than random");
    end
    for (int c = 0; c < 4; c++) check(red[c+4] > red[c], "a slower initiator saves more");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NTRANS * 40us);
    $display("FAIL: watchdog");
    foreach (done[c]) $display("case %0d done %0d checks %0d failures %0d", c, done[c], chk[c], fail[c]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
