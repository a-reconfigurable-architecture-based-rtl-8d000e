// csd_fir: multiplier-less transposed-form FIR filter (top level).
//
// Computes y(n) = sum_{k=0}^{NTAPS-1} b(k) x(n-k) for a symmetric
// coefficient set, b(k) = b(NTAPS-1-k). Three parts, as in the transposed
// form with CSD coefficients:
//   1. an input register for the 32-bit sample;
//   2. a bank of (NTAPS+1)/2 csd_const_mult shift-add multipliers, one per
//      distinct coefficient (6 for 11 taps; symmetry halves the count), whose
//      64-bit products are registered;
//   3. a tdf_chain of NTAPS-1 65-bit delay/adder stages and a 65-bit output
//      register; tap k and tap NTAPS-1-k take the same product.
// No multiplier is built anywhere. Transposed form, symmetry sharing, CSD
// coefficients, 32/64/65-bit widths and order 10 follow the filter
// description. The register placement (input, product and chain registers),
// the valid strobes, the synchronous reset and the Q1.31 default coefficients
// are this design's choices.
//
// Interface: in_valid/x_in give one signed sample; out_valid/y_out return one
// signed 65-bit output, full precision (Q1.31 coefficients: y_out/2^31 has
// the scale of x_in).
// Timing: one sample per clock at most; samples may be spaced by any number
// of idle cycles. The output for a sample appears 3 clock edges after the
// edge that accepts it (out_valid high on that cycle). rst is synchronous,
// active high, and clears the pipeline and the filter history.
module csd_fir
  import csd_fir_pkg::*;
#(
  parameter int    DW             = DATA_W,
  parameter int    CW             = COEF_W,
  parameter int    AW             = ACC_W,
  parameter int    TAPS           = NTAPS,
  parameter coef_t COEFS [TAPS]   = HAMMING_BP_COEFS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x_in,
  output logic                 out_valid,
  output logic signed [AW-1:0] y_out
);

  localparam int PW = DW + CW;
  localparam int NU = (TAPS + 1) / 2;   // distinct coefficients

  // The product sharing below is only correct for symmetric coefficients.
  for (genvar k = 0; k < TAPS / 2; k++) begin : g_sym_check
    if (COEFS[k] != COEFS[TAPS-1-k]) begin : g_bad
      $error("csd_fir: coefficient set is not symmetric");
    end
  end

  // Stage 1: input register.
  logic                 v1;
  logic signed [DW-1:0] x_r;

  always_ff @(posedge clk) begin
    if (rst) begin
      v1  <= 1'b0;
      x_r <= '0;
    end else begin
      v1 <= in_valid;
      if (in_valid) x_r <= x_in;
    end
  end

  // Stage 2: CSD shift-add multipliers and product registers.
  logic                 v2;
  logic signed [PW-1:0] prod   [NU];
  logic signed [PW-1:0] prod_r [NU];

  for (genvar u = 0; u < NU; u++) begin : g_mult
    csd_const_mult #(.DW(DW), .CW(CW), .COEF(COEFS[u])) u_mult (
      .x (x_r),
      .p (prod[u])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v2 <= 1'b0;
      for (int u = 0; u < NU; u++) prod_r[u] <= '0;
    end else begin
      v2 <= v1;
      if (v1) prod_r <= prod;
    end
  end

  // Stage 3: transposed delay/adder chain; mirror taps share a product.
  logic signed [PW-1:0] tap_p [TAPS];

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    assign tap_p[k] = prod_r[(k < NU) ? k : TAPS - 1 - k];
  end

  tdf_chain #(.N(TAPS), .PW(PW), .AW(AW)) u_chain (
    .clk (clk),
    .rst (rst),
    .en  (v2),
    .p   (tap_p),
    .y   (y_out)
  );

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= v2;
  end

endmodule
