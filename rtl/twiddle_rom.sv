// twiddle_rom: precomputed constants of the polynomial multiplier.
//
// Entries 0..127 hold the NTT twiddle factors zeta_i = 17^br7(i) mod 3329
// (br7 = 7-bit bit reversal), used in the order of the incomplete Kyber NTT
// (i = 1..127) and in reverse order by the inverse NTT. Entries 128..255 hold
// the CWM constants gamma_i = 17^(2*br7(i)+1) mod 3329 of the 128 degree-1
// products. The contents are computed at initialisation.
//
// Interface: two read ports, registered outputs (one clock of latency), so
// the two lanes of the dual butterfly unit can read different constants.
module twiddle_rom
  import kyber_pkg::*;
(
  input  logic       clk,
  input  logic [7:0] addr_a,
  input  logic [7:0] addr_b,
  output coef_t      data_a,
  output coef_t      data_b
);

  coef_t mem [256];

  initial begin : fill
    for (int unsigned i = 0; i < 128; i++) begin
      mem[i]       = zeta_entry(7'(i));
      mem[128 + i] = gamma_entry(7'(i));
    end
  end

  always_ff @(posedge clk) begin
    data_a <= mem[addr_a];
    data_b <= mem[addr_b];
  end

endmodule
