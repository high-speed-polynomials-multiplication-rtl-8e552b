// bf_lane: one butterfly of the butterfly unit, around one port of the
// look-up-table modular multiplier (the multiplier itself sits outside, so
// that two lanes can share the dual-mode multiplier).
//
// Modes (mode must stay constant while operands are in flight):
//  MODE_NTT  Cooley-Tukey:  o0 = X + W*Y, o1 = X - W*Y            (X=u0, Y=v0)
//            cycle 0 multiply W*Y (3 clocks), cycle 3 add and subtract
//            (2 clocks), cycle 5 output register.
//  MODE_INTT Gentleman-Sande with the 1/2 of the inverse transform folded in:
//            o0 = (X+Y)/2, o1 = W*(Y-X)/2
//            cycle 0 add and subtract, cycle 2 multiply by W, cycle 5 divide
//            both results by two while registering them.
//  MODE_CWM  product of a0 + a1*x and b0 + b1*x modulo x^2 - gamma
//            (a = {u0,u1}, b = {v0,v1}, gamma = w):
//            o0 = a0*b0 + a1*b1*gamma, o1 = a0*b1 + a1*b0.
//            The five products use the multiplier on five consecutive clocks:
//            a1*b1 first (it is the longest chain), then a0*b0, a0*b1, a1*b0
//            and finally (a1*b1)*gamma; the lane's adder forms o1 and then o0.
//
// Timing: butterflies accept operands on every clock and deliver them 6
// clocks later (out_valid). CWM accepts an operand set at most every 5 clocks
// and delivers the result 10 clocks later. The multiplier must have a latency
// of exactly 3 clocks (mul_p answers the mul_a/mul_b applied 3 clocks before).
module bf_lane
  import kyber_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bf_mode_e mode,
  input  logic     in_valid,
  input  coef_t    u0,
  input  coef_t    u1,
  input  coef_t    v0,
  input  coef_t    v1,
  input  coef_t    w,
  output coef_t    mul_a,
  output coef_t    mul_b,
  input  coef_t    mul_p,
  output logic     out_valid,
  output coef_t    o0,
  output coef_t    o1
);

  typedef enum logic [2:0] {
    T_NONE, T_A1B1, T_A0B0, T_A0B1, T_A1B0, T_G
  } tag_e;

  // ---------------- shared arithmetic ----------------
  coef_t add_a, add_b, add_s;
  coef_t sub_a, sub_b, sub_d;
  coef_t div_in0, div_in1, div_o0, div_o1;

  mod_add  u_add (.clk, .a(add_a), .b(add_b), .s(add_s));
  mod_sub  u_sub (.clk, .a(sub_a), .b(sub_b), .d(sub_d));
  mod_div2 u_d0  (.a(div_in0), .y(div_o0));
  mod_div2 u_d1  (.a(div_in1), .y(div_o1));

  // ---------------- butterfly delay lines ----------------
  coef_t x_d [3];      // X delayed to meet W*Y (NTT)
  coef_t w_d [2];      // W delayed to meet Y-X (INTT)
  coef_t s_d [3];      // (X+Y) delayed to meet W*(Y-X) (INTT)
  logic  v_d [6];      // butterfly valid pipeline

  // ---------------- CWM sequencer ----------------
  logic [2:0] cphase;             // 0 idle, 1..4 issuing products 2..5
  coef_t      ca0, ca1, cb0, cb1, cg;
  coef_t      p11, p00, p01, c1_q;
  tag_e       tag_issue;
  tag_e       tag_d [3];
  logic       c1_cap_d [2];       // a1*b0 entered the adder: c1 two clocks later
  logic       c0_out_d [2];       // a1*b1*gamma entered the adder: c0 two clocks later

  always_comb begin
    tag_issue = T_NONE;
    mul_a     = w;
    mul_b     = v0;
    unique case (mode)
      MODE_NTT: begin
        mul_a = w;
        mul_b = v0;
      end
      MODE_INTT: begin
        mul_a = w_d[1];
        mul_b = sub_d;
      end
      default: begin
        unique case (cphase)
          3'd1: begin mul_a = ca0; mul_b = cb0; tag_issue = T_A0B0; end
          3'd2: begin mul_a = ca0; mul_b = cb1; tag_issue = T_A0B1; end
          3'd3: begin mul_a = ca1; mul_b = cb0; tag_issue = T_A1B0; end
          3'd4: begin mul_a = p11; mul_b = cg;  tag_issue = T_G;    end
          default: begin
            mul_a = u1;
            mul_b = v1;
            tag_issue = in_valid ? T_A1B1 : T_NONE;
          end
        endcase
      end
    endcase
  end

  // adder / subtractor operand selection
  always_comb begin
    unique case (mode)
      MODE_NTT: begin
        add_a = x_d[2]; add_b = mul_p;
        sub_a = x_d[2]; sub_b = mul_p;
      end
      MODE_INTT: begin
        add_a = u0; add_b = v0;
        sub_a = v0; sub_b = u0;
      end
      default: begin
        // a1*b0 arrives one clock after a0*b1, a1*b1*gamma one clock later
        add_a = (tag_d[2] == T_G) ? p00 : p01;
        add_b = mul_p;
        sub_a = '0; sub_b = '0;
      end
    endcase
  end

  assign div_in0 = s_d[2];
  assign div_in1 = mul_p;

  always_ff @(posedge clk) begin
    x_d[0] <= u0;
    x_d[1] <= x_d[0];
    x_d[2] <= x_d[1];
    w_d[0] <= w;
    w_d[1] <= w_d[0];
    s_d[0] <= add_s;
    s_d[1] <= s_d[0];
    s_d[2] <= s_d[1];
    if (cphase == 3'd0 && in_valid) begin
      ca0 <= u0; ca1 <= u1; cb0 <= v0; cb1 <= v1; cg <= w;
    end
    if (tag_d[2] == T_A1B1) p11 <= mul_p;
    if (tag_d[2] == T_A0B0) p00 <= mul_p;
    if (tag_d[2] == T_A0B1) p01 <= mul_p;
    if (c1_cap_d[1])        c1_q <= add_s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cphase    <= '0;
      tag_d     <= '{default: T_NONE};
      c1_cap_d  <= '{default: 1'b0};
      c0_out_d  <= '{default: 1'b0};
      v_d       <= '{default: 1'b0};
      out_valid <= 1'b0;
      o0        <= '0;
      o1        <= '0;
    end else begin
      if (mode == MODE_CWM) begin
        if (cphase != 3'd0) cphase <= (cphase == 3'd4) ? 3'd0 : cphase + 3'd1;
        else if (in_valid)  cphase <= 3'd1;
      end else begin
        cphase <= '0;
      end
      tag_d[0]    <= tag_issue;
      tag_d[1]    <= tag_d[0];
      tag_d[2]    <= tag_d[1];
      c1_cap_d[0] <= (mode == MODE_CWM) && (tag_d[2] == T_A1B0);
      c1_cap_d[1] <= c1_cap_d[0];
      c0_out_d[0] <= (mode == MODE_CWM) && (tag_d[2] == T_G);
      c0_out_d[1] <= c0_out_d[0];
      v_d[0]      <= in_valid && (mode != MODE_CWM);
      for (int i = 1; i < 6; i++) v_d[i] <= v_d[i-1];

      unique case (mode)
        MODE_NTT: begin
          out_valid <= v_d[4];
          o0        <= add_s;
          o1        <= sub_d;
        end
        MODE_INTT: begin
          out_valid <= v_d[4];
          o0        <= div_o0;
          o1        <= div_o1;
        end
        default: begin
          out_valid <= c0_out_d[1];
          o0        <= add_s;
          o1        <= c1_q;
        end
      endcase
    end
  end

  // A new CWM operand set may only arrive once the previous one was issued
  a_cwm_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    (mode == MODE_CWM && cphase != 3'd0) |-> !in_valid)
    else $error("bf_lane: CWM operands applied while the lane is busy");

endmodule
