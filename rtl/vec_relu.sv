// vec_relu: ReLU activation on the four lanes of a vector register.
//
// With sign-magnitude numbers ReLU is a test of the sign bit: a negative lane
// becomes +0, a positive lane passes unchanged, so the output sign bits are
// always 0. Purely combinational.
module vec_relu
  import fixp_pkg::*;
(
  input  fxvec_t a,
  output fxvec_t y
);

  always_comb begin
    for (int l = 0; l < LANES; l++) y[l] = a[l].sign ? fx_t'('0) : a[l];
  end

endmodule
