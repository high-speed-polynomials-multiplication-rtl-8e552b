// index_rom: sub-modular index table of the look-up-table modular multiplier.
//
// For an operand g in 1..q-1 the table holds the residues modulo 7, 31 and 32
// of its discrete logarithm k (g = 3^k mod 3329), packed as a 13-bit word
// {k mod 7 (3b), k mod 31 (5b), k mod 32 (5b)}: the three per-modulus tables
// of the multiplier share one 13-bit x 3329 memory, as the multiplier is
// meant to be mapped on FPGA block RAM. Operand 0 has no logarithm; its entry
// carries the marker 31 in the mod-31 field (31 is never a valid residue mod 31),
// which the following tables propagate to a zero product.
//
// Interface: two independent read ports (A and B), each with a registered
// output: the residues of addr_x appear one clock after addr_x is applied.
// Addresses must lie in 0..q-1. The contents are computed at initialisation
// from the mapping g = 3^k mod q, k = 0..q-2.
module index_rom
  import kyber_pkg::*;
#(
  parameter int unsigned DEPTH = Q
) (
  input  logic  clk,
  input  coef_t addr_a,
  input  coef_t addr_b,
  output rns_t  res_a,
  output rns_t  res_b
);

  rns_t mem [DEPTH];

  initial begin : fill
    int unsigned g;
    g = 1;
    for (int unsigned k = 0; k < Q - 1; k++) begin
      mem[g] = '{r1: 3'(k % M1), r2: 5'(k % M2), r3: 5'(k % M3)};
      g = (g * ALPHA) % Q;
    end
    mem[0] = '{r1: 3'd0, r2: 5'(ZMARK), r3: 5'd0};
  end

  always_ff @(posedge clk) begin
    res_a <= mem[addr_a];
    res_b <= mem[addr_b];
  end

endmodule
