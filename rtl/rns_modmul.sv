// rns_modmul: modular multiplier p = a*b mod 3329 built only from look-up
// tables (no multiplier), in single or dual (DMM) mode.
//
// Cycle 1: each operand is mapped by an index table to the residues of its
// discrete logarithm modulo 7, 31 and 32 (one table for a, one for b).
// Cycle 2: three addition tables add the residues per sub-modulus.
// Cycle 3: the reconstruction table turns the three sums into the product.
// A zero operand is carried as the marker 31 in the mod-31 path and yields 0.
//
// All tables have two read ports. In dual mode (DUAL = 1) port B of every
// table serves a second, independent multiplication, so two products per
// clock come from the same memories; in single mode port B is unused and p1
// is 0. Both modes are fully pipelined: a new operand pair may be applied on
// every clock and its product appears exactly 3 clocks later.
module rns_modmul
  import kyber_pkg::*;
#(
  parameter bit DUAL = 1'b1
) (
  input  logic  clk,
  input  coef_t a0,
  input  coef_t b0,
  output coef_t p0,
  input  coef_t a1,
  input  coef_t b1,
  output coef_t p1
);

  coef_t a1_in, b1_in;
  rns_t  ka0, kb0, ka1, kb1;     // index residues
  rns_t  s0, s1;                 // residue sums
  coef_t z1;

  assign a1_in = DUAL ? a1 : '0;
  assign b1_in = DUAL ? b1 : '0;

  // Stage 1: index tables, one per operand
  index_rom u_idx_a (.clk, .addr_a(a0), .addr_b(a1_in), .res_a(ka0), .res_b(ka1));
  index_rom u_idx_b (.clk, .addr_a(b0), .addr_b(b1_in), .res_a(kb0), .res_b(kb1));

  // Stage 2: sub-modular addition tables
  rns_add_rom #(.MOD(M1), .W(3), .ZERO_MARK(1'b0)) u_add7 (
    .clk, .xa(ka0.r1), .ya(kb0.r1), .xb(ka1.r1), .yb(kb1.r1), .sa(s0.r1), .sb(s1.r1));
  rns_add_rom #(.MOD(M2), .W(5), .ZERO_MARK(1'b1)) u_add31 (
    .clk, .xa(ka0.r2), .ya(kb0.r2), .xb(ka1.r2), .yb(kb1.r2), .sa(s0.r2), .sb(s1.r2));
  rns_add_rom #(.MOD(M3), .W(5), .ZERO_MARK(1'b0)) u_add32 (
    .clk, .xa(ka0.r3), .ya(kb0.r3), .xb(ka1.r3), .yb(kb1.r3), .sa(s0.r3), .sb(s1.r3));

  // Stage 3: reconstruction table
  crt_rom u_crt (.clk, .addr_a(s0), .addr_b(s1), .z_a(p0), .z_b(z1));

  assign p1 = DUAL ? z1 : '0;

endmodule
