// mod_div2: modular division by two, a/2 mod q, for a in 0..q-1.
//
// An even input is shifted right by one. An odd input is shifted right and
// the constant (q+1)/2 = 1665 is added, since (a+q)/2 = (a>>1) + (q+1)/2.
// The result is below q without further reduction. Combinational; the
// butterfly registers it in its last pipeline stage.
module mod_div2
  import kyber_pkg::*;
(
  input  coef_t a,
  output coef_t y
);

  localparam coef_t HALF_Q1 = coef_t'((Q + 1) / 2);

  assign y = (a >> 1) + (a[0] ? HALF_Q1 : '0);

endmodule
