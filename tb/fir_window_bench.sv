// fir_window_bench: runs one windowed band-pass filter through csd_fir with
// audio test tones and checks it sample by sample.
//
// The coefficients of a TAPS-tap band-pass for the 300 Hz .. 3.4 kHz voice
// band at fs = 48 kHz are computed at elaboration from the windowed-sinc
// formula, with a Hamming (WINDOW = 0) or Blackman (WINDOW = 1) window,
// quantised to Q1.31, and passed to csd_fir as its COEFS parameter. Tones of
// 100, 200, 300, 500, 1000, 3300, 3500 and 10000 Hz at half full scale, with
// small uniform noise added, are streamed one sample per clock. Every output
// is compared with a direct-form model; after the filter has settled, the
// output peak over 480 samples (10 ms) gives the gain at that frequency.
// The 1 kHz gain must be near 1 and the 10 kHz gain well below 0.01.
// Results are returned through checks/failures when done rises.
module fir_window_bench #(
  parameter int TAPS   = 101,
  parameter int WINDOW = 0
) (
  output int checks,
  output int failures,
  output bit done
);
  import csd_fir_pkg::*;

  typedef coef_t coef_arr_t [TAPS];

  function automatic coef_arr_t make_coefs();
    coef_arr_t c;
    real pi, f1, f2, m, d, w;
    pi = 3.14159265358979323846;
    f1 = 300.0 / 48000.0;
    f2 = 3400.0 / 48000.0;
    for (int n = 0; n < TAPS; n++) begin
      m = n - (TAPS - 1) / 2.0;
      if (m == 0.0) d = 2.0 * (f2 - f1);
      else          d = ($sin(2.0 * pi * f2 * m) - $sin(2.0 * pi * f1 * m)) / (pi * m);
      if (WINDOW == 0) w = 0.54 - 0.46 * $cos(2.0 * pi * n / (TAPS - 1));
      else             w = 0.42 - 0.5 * $cos(2.0 * pi * n / (TAPS - 1))
                             + 0.08 * $cos(4.0 * pi * n / (TAPS - 1));
      c[n] = coef_t'(longint'(d * w * 2147483648.0));
    end
    return c;
  endfunction

  localparam coef_arr_t C = make_coefs();

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic signed [DATA_W-1:0] x_in = '0;
  logic out_valid;
  logic signed [ACC_W-1:0] y_out;

  csd_fir #(.TAPS(TAPS), .COEFS(C)) dut (
    .clk (clk), .rst (rst), .in_valid (in_valid), .x_in (x_in),
    .out_valid (out_valid), .y_out (y_out)
  );

  always #5 clk = ~clk;

  longint hist [TAPS];
  logic signed [ACC_W+7:0] q [$];
  real peak = 0.0;
  bit measuring = 0;

  initial begin
    checks = 0;
    failures = 0;
    done = 0;
  end

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      logic signed [ACC_W+7:0] e;
      real yr;
      checks++;
      if (q.size() == 0) failures++;
      else begin
        e = q.pop_front();
        if ((ACC_W+8)'(y_out) != e) begin
          failures++;
          if (failures < 5) $display("FAIL taps=%0d y=%0d exp=%0d", TAPS, y_out, e);
        end
      end
      yr = $itor(y_out) / 4611686018427387904.0;   // 2^31 (Q1.31) * 2^31 (full scale)
      if (yr < 0) yr = -yr;
      if (measuring && yr > peak) peak = yr;
    end
  end

  function automatic logic signed [ACC_W+7:0] ref_push(input longint xn);
    logic signed [ACC_W+7:0] acc;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = xn;
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc += (ACC_W+8)'(hist[k] * longint'(C[k]));
    return acc;
  endfunction

  localparam int NF = 8;
  localparam real FREQ [NF] = '{100.0, 200.0, 300.0, 500.0, 1000.0, 3300.0, 3500.0, 10000.0};
  localparam real AMP = 0.5;

  initial begin : stim
    real gain;
    int  n;
    longint xs;
    foreach (hist[k]) hist[k] = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < NF; f++) begin
      peak = 0.0;
      n = 0;
      for (int s = 0; s < TAPS + 8 + 480; s++) begin
        @(negedge clk);
        xs = longint'(AMP * 2147483648.0 * $sin(2.0 * 3.14159265358979323846 * FREQ[f] * s / 48000.0))
             + (longint'($signed($urandom)) >>> 12);
        in_valid = 1'b1;
        x_in = DATA_W'(xs);
        q.push_back(ref_push(xs));
        measuring = (s >= TAPS + 8);
        n++;
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat (4) @(negedge clk);
      gain = peak / AMP;
      $display("taps=%0d window=%s f=%0.0f Hz gain=%f (%0.1f dB)", TAPS,
               (WINDOW != 0) ? "blackman" : "hamming", FREQ[f], gain, 20.0 * $log10(gain + 1e-12));
      if (FREQ[f] == 1000.0) begin
        checks++;
        if (gain < 0.9 || gain > 1.1) begin failures++; $display("FAIL passband gain"); end
      end
      if (FREQ[f] == 10000.0) begin
        checks++;
        if (gain > 0.01) begin failures++; $display("FAIL stopband gain"); end
      end
      measuring = 0;
    end
    checks++;
    if (q.size() != 0) failures++;
    done = 1;
  end
endmodule
