// bf_model: behavioural stand-in for the dual butterfly unit, used to test the
// control unit on its own. It computes the same NTT, INTT and CWM results
// with plain integer arithmetic and delivers them with the same latencies
// (6 clocks for butterflies, 10 clocks for CWM).
module bf_model
  import kyber_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  bf_mode_e    mode,
  input  logic        in_valid,
  input  coef_t [1:0] u0,
  input  coef_t [1:0] u1,
  input  coef_t [1:0] v0,
  input  coef_t [1:0] v1,
  input  coef_t [1:0] w,
  output logic        out_valid,
  output coef_t [1:0] o0,
  output coef_t [1:0] o1
);

  typedef struct packed {
    logic        v;
    coef_t [1:0] r0;
    coef_t [1:0] r1;
  } res_t;

  res_t pipe [10];
  res_t now;

  function automatic int mm(int a, int b); return (a * b) % Q; endfunction
  function automatic int half(int a); return (a % 2 == 0) ? a / 2 : (a + Q) / 2; endfunction

  always_comb begin
    now.v = in_valid;
    for (int k = 0; k < 2; k++) begin
      unique case (mode)
        MODE_NTT: begin
          now.r0[k] = coef_t'((int'(u0[k]) + mm(int'(w[k]), int'(v0[k]))) % Q);
          now.r1[k] = coef_t'((int'(u0[k]) + Q - mm(int'(w[k]), int'(v0[k]))) % Q);
        end
        MODE_INTT: begin
          now.r0[k] = coef_t'(half((int'(u0[k]) + int'(v0[k])) % Q));
          now.r1[k] = coef_t'(half(mm(int'(w[k]), (int'(v0[k]) + Q - int'(u0[k])) % Q)));
        end
        default: begin
          now.r0[k] = coef_t'((mm(int'(u0[k]), int'(v0[k])) +
                               mm(mm(int'(u1[k]), int'(v1[k])), int'(w[k]))) % Q);
          now.r1[k] = coef_t'((mm(int'(u0[k]), int'(v1[k])) + mm(int'(u1[k]), int'(v0[k]))) % Q);
        end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pipe <= '{default: '0};
    end else begin
      pipe[0] <= now;
      for (int i = 1; i < 10; i++) pipe[i] <= pipe[i-1];
    end
  end

  always_comb begin
    res_t r;
    r = (mode == MODE_CWM) ? pipe[9] : pipe[5];
    out_valid = r.v;
    o0 = r.r0;
    o1 = r.r1;
  end

endmodule
