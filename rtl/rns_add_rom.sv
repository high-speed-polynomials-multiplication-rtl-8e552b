// rns_add_rom: sub-modular addition table of the look-up-table multiplier.
//
// The table is addressed by the concatenation {x, y} of two residues of one
// sub-modulus MOD and holds (x + y) mod MOD, so the index addition of the
// multiplier costs one memory read. With ZERO_MARK set (used for the mod-31
// table) the row and column of the marker value MOD also hold MOD, so a zero
// operand stays marked up to the reconstruction table. Address patterns that
// are not residues hold 0.
//
// Interface: two independent read ports, registered outputs (one clock of
// latency). Tables: 3-bit x 64 for MOD = 7, 5-bit x 1024 for MOD = 31 and 32.
module rns_add_rom #(
  parameter int unsigned MOD       = 31,
  parameter int unsigned W         = 5,
  parameter bit          ZERO_MARK = 1'b1
) (
  input  logic         clk,
  input  logic [W-1:0] xa,
  input  logic [W-1:0] ya,
  input  logic [W-1:0] xb,
  input  logic [W-1:0] yb,
  output logic [W-1:0] sa,
  output logic [W-1:0] sb
);

  localparam int unsigned DEPTH = 1 << (2 * W);

  logic [W-1:0] mem [DEPTH];

  initial begin : fill
    for (int unsigned x = 0; x < (1 << W); x++) begin
      for (int unsigned y = 0; y < (1 << W); y++) begin
        if (ZERO_MARK && (x == MOD || y == MOD))
          mem[(x << W) | y] = W'(MOD);
        else if (x < MOD && y < MOD)
          mem[(x << W) | y] = W'((x + y) % MOD);
        else
          mem[(x << W) | y] = '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    sa <= mem[{xa, ya}];
    sb <= mem[{xb, yb}];
  end

endmodule
