// crt_rom: reconstruction table of the look-up-table modular multiplier.
//
// Addressed by {r1, r2, r3}, the sums modulo 7, 31 and 32 of the two operand
// indices: r1 selects one of 7 pages, r2 the column and r3 the row, giving a
// 12-bit x 7168 table. Each entry folds three steps into one read:
//   r  = |r1*2976 + r2*2016 + r3*1953|_6944   (Chinese remainder theorem)
//   ri = |r|_3328                             (modulus overflow correction)
//   z  = |3^ri|_3329                          (inverse index look-up)
// Column r2 = 31 (zero-operand marker) holds zeros.
//
// Interface: two read ports with registered outputs (one clock of latency).
module crt_rom
  import kyber_pkg::*;
(
  input  logic  clk,
  input  rns_t  addr_a,
  input  rns_t  addr_b,
  output coef_t z_a,
  output coef_t z_b
);

  localparam int unsigned DEPTH = M1 * 1024;   // 7168

  coef_t mem [DEPTH];

  initial begin : fill
    for (int unsigned r1 = 0; r1 < M1; r1++)
      for (int unsigned r2 = 0; r2 < 32; r2++)
        for (int unsigned r3 = 0; r3 < 32; r3++)
          mem[r1 * 1024 + r2 * 32 + r3] = crt_entry(r1, r2, r3);
  end

  always_ff @(posedge clk) begin
    z_a <= mem[13'(addr_a)];
    z_b <= mem[13'(addr_b)];
  end

endmodule
