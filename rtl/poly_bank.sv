// poly_bank: one coefficient memory bank of the polynomial multiplier.
//
// A simple dual-port RAM (one read port, one write port, as FPGA block RAM
// offers) of DEPTH words. Each word packs LANES coefficients, one per
// butterfly lane: 2 coefficients (24 bits, 128 words) for the dual butterfly
// unit, 1 coefficient (12 bits, 256 words) for the single one, 4 (48 bits,
// 64 words) for two DBUs. So one read feeds every lane of the butterfly
// unit. The accelerator uses two such banks; which bank holds a word is
// decided by the parity of its address (see pm_ctrl), so the two words a butterfly pair reads, and later writes
// back in place, always sit in different banks. Per-coefficient write enables
// allow single coefficients to be loaded. Packing coefficients into one word
// per lane follows the reference architecture; the split into two
// parity-interleaved banks is this design's choice.
//
// Interface: raddr is read every clock, the word appears on rdata one clock
// later; we/waddr/wdata write on the same edge. A read of the word being
// written in the same clock returns the old contents.
module poly_bank
  import kyber_pkg::*;
#(
  parameter int unsigned LANES = BU_LANES,
  parameter int unsigned DEPTH = N / LANES
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [LANES-1:0]         we,      // per-coefficient write enables
  input  logic [LANES*QW-1:0]      wdata,
  output logic [LANES*QW-1:0]      rdata
);

  logic [LANES*QW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int k = 0; k < LANES; k++)
      if (we[k]) mem[waddr][k*QW +: QW] <= wdata[k*QW +: QW];
    rdata <= mem[raddr];
  end

endmodule
