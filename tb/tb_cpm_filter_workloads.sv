// tb_cpm_filter_workloads - runs the channel filter at every evaluated length.
//
// D-AMPS: 260, 610, 940 and 1180 taps, cutoff 30.25 kHz at 34.02 MHz.
// PDC:    240, 590, 880 and 1000 taps, cutoff 12.5 kHz (half the 25 kHz channel
//         spacing) at 25.6 MHz.
// Every length runs with 16-bit and with 24-bit coefficients. Each configuration is checked sample by
// sample against a multiply-accumulate reference (tb_filter_runner).
module tb_cpm_filter_workloads;
  localparam real FC_DAMPS = 30.25e3 / 34.02e6;
  localparam real FC_PDC   = 12.5e3 / 25.6e6;
  localparam int  NCFG = 16;
  localparam int  NS [NCFG] = '{260, 610, 940, 1180, 240, 590, 880, 1000,
                                260, 610, 940, 1180, 240, 590, 880, 1000};
  localparam int  WS [NCFG] = '{16, 16, 16, 16, 16, 16, 16, 16,
                                24, 24, 24, 24, 24, 24, 24, 24};

  logic clk = 0;
  logic done [NCFG];
  int   chk [NCFG];
  int   fail [NCFG];
  int   checks;
  int   failures;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    tb_filter_runner #(
      .N    (NS[i]),
      .WC   (WS[i]),
      .FC   ((i % 8 < 4) ? FC_DAMPS : FC_PDC),
      .SEED (i + 1)
    ) u_run (.clk(clk), .done(done[i]), .checks(chk[i]), .failures(fail[i]));
  end

  function automatic bit all_done();
    for (int i = 0; i < NCFG; i++) if (!done[i]) return 0;
    return 1;
  endfunction

  initial begin : watchdog
    #1000000;
    checks = 0;
    failures = 1;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    #20;
    while (!all_done()) @(posedge clk);
    checks = 0;
    failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      $display("N=%0d WC=%0d: checks %0d failures %0d", NS[i], WS[i], chk[i], fail[i]);
      checks += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
