// butterfly_unit: configurable butterfly unit of the polynomial multiplier.
//
// LANES = 2 gives the dual butterfly unit (DBU): two butterfly lanes share one
// look-up-table modular multiplier in dual mode, each lane using one of its
// two ports, so two butterflies (or two CWM pairs) are processed at the same
// time with the memory of a single multiplier. LANES = 1 gives the single
// butterfly unit (SBU) with the multiplier in single mode. LANES = 4 gives
// two DBUs side by side (lanes 2m and 2m+1 share multiplier m), the
// butterfly resources of the two-DBU accelerator. The DBU and SBU follow the
// reference architecture; grouping two DBUs in one module is this design's
// choice.
//
// Each lane holds one modular adder, one modular subtractor (both 2 clocks)
// and two divide-by-two units; see bf_lane for the NTT, INTT and CWM data
// flows. Per lane k the operands are u0[k], u1[k], v0[k], v1[k] and w[k]:
// butterflies use X = u0, Y = v0, W = w; CWM uses a = (u0, u1), b = (v0, v1),
// gamma = w.
//
// Timing: NTT/INTT butterflies: one operand set per lane per clock, results
// 6 clocks later. CWM: one operand set per lane every 5 clocks, results 10
// clocks later. All lanes share in_valid and run in lock step.
module butterfly_unit
  import kyber_pkg::*;
#(
  parameter int unsigned LANES = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  bf_mode_e              mode,
  input  logic                  in_valid,
  input  coef_t [LANES-1:0]     u0,
  input  coef_t [LANES-1:0]     u1,
  input  coef_t [LANES-1:0]     v0,
  input  coef_t [LANES-1:0]     v1,
  input  coef_t [LANES-1:0]     w,
  output logic                  out_valid,
  output coef_t [LANES-1:0]     o0,
  output coef_t [LANES-1:0]     o1
);

  localparam int unsigned NMUL = (LANES + 1) / 2;   // multipliers, two ports each

  coef_t [2*NMUL-1:0] mul_a, mul_b, mul_p;
  logic [LANES-1:0]   lane_valid;

  for (genvar m = 0; m < NMUL; m++) begin : g_mul
    rns_modmul #(.DUAL(LANES > 1)) u_mul (
      .clk,
      .a0(mul_a[2*m]),   .b0(mul_b[2*m]),   .p0(mul_p[2*m]),
      .a1(mul_a[2*m+1]), .b1(mul_b[2*m+1]), .p1(mul_p[2*m+1])
    );
  end

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    bf_lane u_lane (
      .clk, .rst_n, .mode, .in_valid,
      .u0(u0[k]), .u1(u1[k]), .v0(v0[k]), .v1(v1[k]), .w(w[k]),
      .mul_a(mul_a[k]), .mul_b(mul_b[k]), .mul_p(mul_p[k]),
      .out_valid(lane_valid[k]), .o0(o0[k]), .o1(o1[k])
    );
  end

  if (LANES == 1) begin : g_single
    assign mul_a[1] = '0;
    assign mul_b[1] = '0;
  end

  assign out_valid = &lane_valid;   // lanes run in lock step

  initial begin
    if (LANES != 1 && LANES != 2 && LANES != 4)
      $fatal(1, "butterfly_unit: LANES must be 1 (SBU), 2 (DBU) or 4 (two DBUs)");
  end

endmodule
