// csd_fir_tb: end-to-end self-checking test of the CSD transposed-form FIR
// filter at its default size (11 taps, 32-bit samples, 65-bit output).
//
// The reference coefficients are recomputed here from the Hamming-windowed
// band-pass formula (300 Hz .. 3.4 kHz, fs = 48 kHz, Q1.31) with real
// arithmetic, and a direct-form model sum b(k) x(n-k) gives the expected
// output of every sample. The test covers:
//   - impulse response: a unit impulse (x = 1) must return the 11 coefficients;
//   - full-scale steps and alternating +/- full-scale input (largest output);
//   - random samples, both back-to-back and separated by idle cycles;
//   - a synchronous reset in the middle of a stream, which must clear history;
//   - latency: every output must appear exactly 3 cycles after its sample,
//     and out_valid must pulse exactly once per accepted sample.
// Each of these is counted and a failure is recorded for any that never ran.
module csd_fir_tb;
  import csd_fir_pkg::*;

  localparam int LAT = 3;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [DATA_W-1:0] x_in = '0;
  logic out_valid;
  logic signed [ACC_W-1:0] y_out;

  csd_fir dut (
    .clk (clk), .rst (rst), .in_valid (in_valid), .x_in (x_in),
    .out_valid (out_valid), .y_out (y_out)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference coefficients from the window formula.
  longint b [NTAPS];
  function automatic void make_coefs();
    real pi, f1, f2, m, d, w;
    pi = 3.14159265358979323846;
    f1 = 300.0 / 48000.0;
    f2 = 3400.0 / 48000.0;
    for (int n = 0; n < NTAPS; n++) begin
      m = n - (NTAPS - 1) / 2.0;
      if (m == 0.0) d = 2.0 * (f2 - f1);
      else          d = ($sin(2.0 * pi * f2 * m) - $sin(2.0 * pi * f1 * m)) / (pi * m);
      w = 0.54 - 0.46 * $cos(2.0 * pi * n / (NTAPS - 1));
      b[n] = longint'(d * w * 2147483648.0);   // rounds to nearest
    end
  endfunction

  // Direct-form model and expected-output queue.
  longint hist [NTAPS];
  typedef struct { logic signed [ACC_W+3:0] y; longint t; } exp_t;
  exp_t q [$];

  function automatic logic signed [ACC_W+3:0] ref_push(input longint xn);
    logic signed [ACC_W+3:0] acc;
    for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = xn;
    acc = '0;
    for (int k = 0; k < NTAPS; k++) acc += (ACC_W+4)'(hist[k] * b[k]);
    return acc;
  endfunction

  // Output checker.
  int outs = 0;
  always @(posedge clk) begin
    if (!rst && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if ((ACC_W+4)'(y_out) != e.y) begin
          failures++;
          if (failures < 10) $display("FAIL y=%0d exp=%0d", y_out, e.y);
        end
        checks++;
        if (cycle - e.t != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d", cycle - e.t);
        end
        outs++;
      end
    end
  end

  int n_impulse = 0, n_fullscale = 0, n_gap = 0, n_b2b = 0, n_reset = 0, n_samples = 0;
  bit last_was_sample = 0;

  task automatic send(input logic signed [DATA_W-1:0] xv);
    exp_t e;
    @(negedge clk);
    in_valid = 1'b1;
    x_in     = xv;
    e.y = ref_push(longint'(xv));
    e.t = cycle;              // cycle count seen at the accepting edge
    q.push_back(e);
    if (last_was_sample) n_b2b++;
    last_was_sample = 1;
    n_samples++;
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  task automatic idle(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1'b0;
      x_in = $urandom;        // must be ignored
      @(posedge clk);
    end
    if (n > 0) begin n_gap++; last_was_sample = 0; end
  endtask

  task automatic drain();
    idle(LAT + 2);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", q.size()); end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    q.delete();
    foreach (hist[k]) hist[k] = 0;
    last_was_sample = 0;
  endtask

  initial begin : stim
    make_coefs();
    foreach (hist[k]) hist[k] = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Impulse response, back-to-back and with gaps.
    for (int r = 0; r < 2; r++) begin
      send(32'sd1);
      for (int k = 1; k < NTAPS + 2; k++) begin
        send(32'sd0);
        if (r == 1) idle(k % 3);
      end
      n_impulse++;
    end
    drain();

    // Full scale: largest-magnitude outputs.
    for (int k = 0; k < NTAPS + 2; k++) send(32'sh8000_0000);
    for (int k = 0; k < NTAPS + 2; k++) send(32'sh7fff_ffff);
    for (int k = 0; k < 2 * NTAPS; k++) send(k[0] ? 32'sh7fff_ffff : 32'sh8000_0000);
    n_fullscale++;
    drain();

    // Random stream with random gaps.
    for (int k = 0; k < 3000; k++) begin
      send($urandom);
      idle(($urandom % 3 == 0) ? $urandom % 4 : 0);
    end

    // Reset in the middle of a stream (pipeline still full).
    send(32'sh4000_0000);
    send(-32'sd123456);
    do_reset();
    n_reset++;
    checks++;
    if (out_valid || y_out != 0) begin failures++; $display("FAIL reset did not clear"); end
    send(32'sd1);
    for (int k = 1; k < NTAPS; k++) send(32'sd0);
    n_impulse++;
    for (int k = 0; k < 500; k++) send($urandom);
    drain();

    // Every mechanism must have happened.
    checks++;
    if (n_impulse == 0 || n_fullscale == 0 || n_gap == 0 || n_b2b == 0 || n_reset == 0
        || outs == 0) begin
      failures++;
      $display("FAIL a mechanism never ran");
    end
    checks++;
    if (outs != n_samples - 2) begin   // two samples were discarded by the reset
      failures++;
      $display("FAIL %0d outputs for %0d samples", outs, n_samples);
    end
    $display("impulses=%0d fullscale=%0d gaps=%0d back_to_back=%0d resets=%0d samples=%0d outputs=%0d",
             n_impulse, n_fullscale, n_gap, n_b2b, n_reset, n_samples, outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
