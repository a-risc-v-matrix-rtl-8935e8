// vec_adder: adds two vector registers lane by lane.
//
// Four fixp_add instances, one per lane, so each lane follows the
// sign-magnitude addition rules. Purely combinational: the issue unit writes
// the sum back in the same cycle the operands are read.
module vec_adder
  import fixp_pkg::*;
(
  input  fxvec_t a,
  input  fxvec_t b,
  output fxvec_t s,
  output logic [LANES-1:0] ovf
);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    fixp_add u_add (.a(a[l]), .b(b[l]), .s(s[l]), .ovf(ovf[l]));
  end

endmodule
