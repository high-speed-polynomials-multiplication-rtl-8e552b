// kyber_pmul_top: NTT-based polynomial multiplier for CRYSTALS-Kyber with one
// dual butterfly unit (DBU) whose modular multiplications are done entirely
// in look-up tables.
//
// It multiplies two polynomials of Z_3329[x]/(x^256+1) as
// INTT(NTT(a) * NTT(b)) with Kyber's incomplete (7-stage) NTT. Four parts:
//  * two coefficient banks (poly_bank) that together hold both operands,
//    two coefficients per 24-bit word, B in opposite word order, words spread
//    over the banks by address parity;
//  * the twiddle ROM (twiddle_rom) with the NTT twiddles and CWM constants;
//  * the DBU (butterfly_unit, LANES = 2): two NTT/INTT/CWM butterflies
//    sharing one dual-mode look-up-table modular multiplier;
//  * the control unit (pm_ctrl): state machines and addresses.
//
// Use: while busy is low, load the 256 coefficients of a (host_sel = 0) and
// b (host_sel = 1) with host_we/host_idx/host_wdata, pulse start with
// op = OP_PMUL, wait for done, then read the product back as polynomial A
// with host_re (data on host_rdata one clock later, host_rvalid high).
// op = OP_NTT / OP_INTT transform the polynomial chosen by sel in place;
// OP_CWM replaces A by the pair-wise product of A and B in the NTT domain.
// A full multiplication takes 3*455 + 328 = 1693 clocks after the clock that
// accepts start; an NTT or INTT alone 455, a CWM alone 328.
//
// LANES = 1 builds the single-butterfly-unit version of the same
// accelerator instead: one coefficient per 12-bit word, 256 words per bank,
// the multiplier in single mode; NTT/INTT take 903 clocks, CWM 648 and a
// full multiplication 3357. LANES = 4 builds the two-DBU version: two
// dual-mode multipliers, a second twiddle ROM, four coefficients per 48-bit
// word, 64 words per bank; NTT/INTT take 231 clocks, CWM 168, a full
// multiplication 861. The default (one DBU) is the main configuration
// of the reference architecture; the twiddle ordering, host port and
// handshake are this design's own.
module kyber_pmul_top
  import kyber_pkg::*;
#(
  parameter int unsigned LANES = BU_LANES    // 2: one DBU, 1: one SBU, 4: two DBUs
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  op_e        op,
  input  logic       sel,
  output logic       busy,
  output logic       done,
  input  logic       host_we,
  input  logic       host_re,
  input  logic       host_sel,
  input  logic [7:0] host_idx,
  input  coef_t      host_wdata,
  output coef_t      host_rdata,
  output logic       host_rvalid
);

  localparam int unsigned DEPTH = N / LANES;   // words per bank
  localparam int unsigned BAW   = $clog2(DEPTH);

  logic [BAW-1:0]      bank_raddr [NUM_BANKS];
  logic [BAW-1:0]      bank_waddr [NUM_BANKS];
  logic [LANES-1:0]    bank_we    [NUM_BANKS];
  logic [LANES*QW-1:0] bank_wdata [NUM_BANKS];
  logic [LANES*QW-1:0] bank_rdata [NUM_BANKS];
  localparam int unsigned TWP = (LANES > 2) ? LANES : 2;   // twiddle read ports

  logic [7:0]          tw_addr [TWP];
  coef_t               tw_data [TWP];
  bf_mode_e            bf_mode;
  logic                bf_valid, bf_ovalid;
  coef_t [LANES-1:0]   bf_u0, bf_u1, bf_v0, bf_v1, bf_w, bf_o0, bf_o1;

  pm_ctrl #(.LANES(LANES)) u_ctrl (
    .clk, .rst_n, .start, .op, .sel, .busy, .done,
    .host_we, .host_re, .host_sel, .host_idx, .host_wdata, .host_rdata, .host_rvalid,
    .bank_raddr, .bank_waddr, .bank_we, .bank_wdata, .bank_rdata, .tw_addr, .tw_data,
    .bf_mode, .bf_valid, .bf_u0, .bf_u1, .bf_v0, .bf_v1, .bf_w,
    .bf_ovalid, .bf_o0, .bf_o1
  );

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    poly_bank #(.LANES(LANES)) u_bank (
      .clk, .raddr(bank_raddr[b]), .waddr(bank_waddr[b]), .we(bank_we[b]),
      .wdata(bank_wdata[b]), .rdata(bank_rdata[b])
    );
  end

  // one two-port twiddle ROM per dual butterfly unit (one for the SBU)
  for (genvar r = 0; r < TWP / 2; r++) begin : g_tw
    twiddle_rom u_tw (
      .clk, .addr_a(tw_addr[2*r]), .addr_b(tw_addr[2*r+1]),
      .data_a(tw_data[2*r]), .data_b(tw_data[2*r+1])
    );
  end

  butterfly_unit #(.LANES(LANES)) u_bu (
    .clk, .rst_n, .mode(bf_mode), .in_valid(bf_valid),
    .u0(bf_u0), .u1(bf_u1), .v0(bf_v0), .v1(bf_v1), .w(bf_w),
    .out_valid(bf_ovalid), .o0(bf_o0), .o1(bf_o1)
  );

endmodule
