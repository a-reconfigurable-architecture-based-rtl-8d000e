// csd_fir_workload_tb: the order-100 and order-400 voice-band filters.
//
// Four csd_fir instances, each built through fir_window_bench with its own
// coefficient set: 101 and 401 taps, each with a Hamming and a Blackman
// window (300 Hz .. 3.4 kHz band-pass, fs = 48 kHz, Q1.31). Each is driven
// with the same set of noisy test tones, checked sample by sample against a
// direct-form model, and its gain per tone is printed.
module csd_fir_workload_tb;
  int c [4], f [4];
  bit d [4];

  fir_window_bench #(.TAPS(101), .WINDOW(0)) b_h100 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  fir_window_bench #(.TAPS(101), .WINDOW(1)) b_b100 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  fir_window_bench #(.TAPS(401), .WINDOW(0)) b_h400 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  fir_window_bench #(.TAPS(401), .WINDOW(1)) b_b400 (.checks(c[3]), .failures(f[3]), .done(d[3]));

  int checks, failures;

  initial begin : watchdog
    #2_000_000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin : finish
    wait (d[0] && d[1] && d[2] && d[3]);
    #1;
    checks = c.sum();
    failures = f.sum();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
