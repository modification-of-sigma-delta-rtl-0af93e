// Runs the converter configurations that were evaluated, side by side, each
// with a 15 Hz sine played as tonic spikes (one full signal period where the
// simulation time allows):
//   OSR 10   : 6700 samples of 500 clocks   (one 15 Hz period)
//   OSR 100  : lower loop order 1/1, i.e. the converter before the order
//              increase, 700 samples of 5000 clocks (one period)
//   OSR 1000 : 70 samples of 50000 clocks   (one period)
// The default configuration (OSR 100, orders 2/2) is run by
// tb_sd_mash_dac_top_full. Each run is checked by tb_dac_run.
module tb_workloads;
  bit d0, d1, d2;
  int c0, c1, c2, f0, f1, f2;

  tb_dac_run #(.OSR(10),   .NSAMP(6700))                      run_osr10   (.done(d0), .checks(c0), .failures(f0));
  tb_dac_run #(.OSR(100),  .ORDER1(1), .ORDER2(1), .NSAMP(700)) run_order1 (.done(d1), .checks(c1), .failures(f1));
  tb_dac_run #(.OSR(1000), .NSAMP(70))                        run_osr1000 (.done(d2), .checks(c2), .failures(f2));

  int checks, failures;

  initial begin
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Global watchdog: 4 million 50 MHz clocks (each run needs at most 3.5 M).
  initial begin
    #80ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end
endmodule
