// fixp_mul: sign-magnitude Q5.10 multiplier.
//
// The 15-bit magnitudes are multiplied into a 30-bit product. Bits 24:10 of it
// are the result magnitude; the ten bits below are below the resolution and are
// dropped, and the five bits above are the overflow, which is dropped too and
// only reported on `ovf`. The result sign is the XOR of the operand signs.
// These three rules are the fixed-point format's. Returning +0 rather than -0
// for a zero magnitude is this design's choice. Purely combinational.
module fixp_mul
  import fixp_pkg::*;
(
  input  fx_t  a,
  input  fx_t  b,
  output fx_t  p,
  output logic ovf   // 1 when the true product magnitude is 32 or more
);

  logic [2*MAG_W-1:0] prod;

  always_comb begin
    prod   = a.mag * b.mag;
    p.mag  = prod[MAG_W+FRAC_W-1:FRAC_W];
    p.sign = (a.sign ^ b.sign) & (p.mag != '0);
    ovf    = |prod[2*MAG_W-1:MAG_W+FRAC_W];
  end

endmodule
