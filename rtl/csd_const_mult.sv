// csd_const_mult: multiplier-less multiplication of a signed sample by a
// fixed coefficient.
//
// The coefficient COEF is recoded at elaboration time into canonical signed
// digits (csd_fir_pkg::csd_recode). For every nonzero digit of weight 2^i the
// sample, sign-extended to the product width, is shifted left by i and added
// (digit +1) or subtracted (digit -1). Zero digits cost nothing, so the
// hardware is one adder/subtractor per nonzero digit minus one; no multiplier
// is built. Replacing the multiplier by shifts and adds of a CSD coefficient
// is the filter's central idea; summing the terms in one linear chain is this
// design's choice (synthesis is free to rebalance it).
//
// Interface: x (DATA_W-bit signed) in, p = x * COEF (DATA_W+COEF_W bits,
// signed, exact) out.
// Timing: purely combinational, no clock.
module csd_const_mult
  import csd_fir_pkg::*;
#(
  parameter int    DW   = DATA_W,
  parameter int    CW   = COEF_W,
  parameter coef_t COEF = HAMMING_BP_COEFS[NTAPS/2]
) (
  input  logic signed [DW-1:0]    x,
  output logic signed [DW+CW-1:0] p
);

  localparam int   PW  = DW + CW;
  localparam csd_t CSD = csd_recode(COEF);

  // The package fixes the coefficient type at COEF_W bits.
  if (CW != COEF_W) begin : g_bad_width
    $error("csd_const_mult: CW must equal csd_fir_pkg::COEF_W");
  end

  always_comb begin
    logic signed [PW-1:0] xe;
    xe = PW'(x);
    p  = '0;
    for (int i = 0; i <= CW; i++) begin
      if (CSD.pos[i]) p = p + (xe <<< i);
      if (CSD.neg[i]) p = p - (xe <<< i);
    end
  end

endmodule
