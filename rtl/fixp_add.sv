// fixp_add: sign-magnitude Q5.10 adder.
//
// Equal signs: the magnitudes are added and the sign kept. Different signs:
// both differences A-B and B-A are formed, the magnitudes are compared, and the
// larger operand gives both its sign and the difference that is used. This is
// the adder of the fixed-point format. A carry out of the 15-bit magnitude is
// dropped (the result wraps) and reported on `ovf`; a zero result is +0. Those
// two points are this design's choice. Purely combinational.
module fixp_add
  import fixp_pkg::*;
(
  input  fx_t  a,
  input  fx_t  b,
  output fx_t  s,
  output logic ovf
);

  logic [MAG_W:0]   sum;
  logic [MAG_W-1:0] a_minus_b, b_minus_a;
  logic             a_ge_b;

  always_comb begin
    sum       = {1'b0, a.mag} + {1'b0, b.mag};
    a_minus_b = a.mag - b.mag;
    b_minus_a = b.mag - a.mag;
    a_ge_b    = (a.mag >= b.mag);
    ovf       = 1'b0;
    if (a.sign == b.sign) begin
      s.mag  = sum[MAG_W-1:0];
      s.sign = a.sign;
      ovf    = sum[MAG_W];
    end else if (a_ge_b) begin
      s.mag  = a_minus_b;
      s.sign = a.sign;
    end else begin
      s.mag  = b_minus_a;
      s.sign = b.sign;
    end
    if (s.mag == '0) s.sign = 1'b0;
  end

endmodule
