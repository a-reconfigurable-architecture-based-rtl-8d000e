// csd_fir_pkg: sizes, default coefficients and the canonical-signed-digit
// (CSD) recoding shared by the multiplier-less FIR filter.
//
// Word sizes follow the filter's 32-bit datapath: 32-bit samples, 32-bit
// coefficients, 64-bit products and a 65-bit accumulation chain.
//
// The default coefficients are an order-10 (11-tap) Hamming-windowed
// band-pass for the 300 Hz .. 3.4 kHz voice band at fs = 48 kHz:
//   m    = n - 5,  n = 0..10
//   d(m) = [sin(2*pi*f2*m) - sin(2*pi*f1*m)] / (pi*m),  d(0) = 2*(f2 - f1)
//   w(n) = 0.54 - 0.46*cos(2*pi*n/10)
//   b(n) = round(d(m) * w(n) * 2^31)          (Q1.31, f1 = 300/48000, f2 = 3400/48000)
// The window, band and sample rate follow the filter specification; the
// Q1.31 quantisation is this design's choice. With only 11 taps the 300 Hz
// lower edge cannot be resolved, so the response is effectively a 3.4 kHz
// low-pass; longer filters just need a longer coefficient list.
package csd_fir_pkg;

  localparam int DATA_W = 32;               // input sample width
  localparam int COEF_W = 32;               // coefficient width (Q1.31)
  localparam int PROD_W = DATA_W + COEF_W;  // 64-bit product
  localparam int ACC_W  = PROD_W + 1;       // 65-bit accumulation chain
  localparam int NTAPS  = 11;               // order 10

  typedef logic signed [COEF_W-1:0] coef_t;

  localparam coef_t HAMMING_BP_COEFS [NTAPS] = '{
    32'sd6543229,   32'sd23570415,  32'sd77492830,  32'sd162896244,
    32'sd243950093, 32'sd277383305, 32'sd243950093, 32'sd162896244,
    32'sd77492830,  32'sd23570415,  32'sd6543229
  };

  // Signed-digit form of a constant: bit i of pos (neg) set means the digit
  // of weight 2^i is +1 (-1). CSD has no two adjacent nonzero digits, which
  // gives the fewest additions/subtractions of any signed-digit form.
  typedef struct packed {
    logic [COEF_W:0] pos;
    logic [COEF_W:0] neg;
  } csd_t;

  // Recode a two's-complement constant into CSD. At each step the remainder
  // r is odd or even; when odd the digit is +1 if r = 1 (mod 4) and -1 if
  // r = 3 (mod 4), which forces the next digit to zero. A COEF_W-bit signed
  // value needs at most COEF_W+1 digits.
  function automatic csd_t csd_recode(input coef_t c);
    logic signed [COEF_W+1:0] r;
    csd_t d;
    r = {{2{c[COEF_W-1]}}, c};
    d = '0;
    for (int i = 0; i <= COEF_W; i++) begin
      if (r[0]) begin
        if (r[1]) begin
          d.neg[i] = 1'b1;
          r = r + 1;
        end else begin
          d.pos[i] = 1'b1;
          r = r - 1;
        end
      end
      r = r >>> 1;
    end
    return d;
  endfunction

  // Number of nonzero digits, i.e. shifted terms summed by a CSD multiplier.
  function automatic int csd_weight(input coef_t c);
    csd_t d;
    d = csd_recode(c);
    return $countones(d.pos) + $countones(d.neg);
  endfunction

endpackage
