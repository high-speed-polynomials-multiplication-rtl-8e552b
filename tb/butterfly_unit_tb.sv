// butterfly_unit_tb: checks the dual butterfly unit (LANES = 2) and the
// two-DBU unit (LANES = 4, every lane with its own operands) in all three
// modes against arithmetic done here, and the single butterfly unit
// (LANES = 1) in CWM mode.
//  NTT : one operand set per clock, o0 = X + W*Y, o1 = X - W*Y, 6 clocks later
//  INTT: one operand set per clock, o0 = (X+Y)/2, o1 = W*(Y-X)/2, 6 clocks later
//  CWM : one operand set every 5 clocks,
//        o0 = a0*b0 + a1*b1*g, o1 = a0*b1 + a1*b0, 10 clocks later
module butterfly_unit_tb;
  import kyber_pkg::*;

  localparam int L = 4;     // operand lanes driven; the DBU takes lanes 0-1

  logic        clk = 1'b0, rst_n = 1'b0;
  bf_mode_e    mode = MODE_NTT;
  logic        in_valid = 1'b0;
  coef_t [L-1:0] u0, u1, v0, v1, w;
  coef_t [1:0]   o0, o1;
  logic        out_valid;
  // two-DBU unit
  logic          q_valid;
  coef_t [L-1:0] q_o0, q_o1;
  // single-lane unit
  logic        s_valid;
  coef_t [0:0] s_o0, s_o1;

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  butterfly_unit #(.LANES(2)) dut (.clk, .rst_n, .mode, .in_valid, .u0(u0[1:0]), .u1(u1[1:0]),
                                  .v0(v0[1:0]), .v1(v1[1:0]), .w(w[1:0]),
                                  .out_valid, .o0, .o1);
  butterfly_unit #(.LANES(4)) qbu (.clk, .rst_n, .mode, .in_valid, .u0, .u1, .v0, .v1, .w,
                                  .out_valid(q_valid), .o0(q_o0), .o1(q_o1));
  butterfly_unit #(.LANES(1)) sbu (.clk, .rst_n, .mode, .in_valid, .u0(u0[0:0]), .u1(u1[0:0]),
                                  .v0(v0[0:0]), .v1(v1[0:0]), .w(w[0:0]),
                                  .out_valid(s_valid), .o0(s_o0), .o1(s_o1));

  typedef struct { int t; int e0 [L]; int e1 [L]; } exp_t;
  exp_t q_exp [$];

  function automatic int mm(int a, int b); return (a * b) % Q; endfunction
  function automatic int half(int a); return (a % 2 == 0) ? a / 2 : (a + Q) / 2; endfunction

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  // compare outputs with the queue of expected results
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (q_exp.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        exp_t e;
        e = q_exp.pop_front();
        chk("latency", cyc, e.t);
        for (int k = 0; k < 2; k++) begin
          chk("o0", int'(o0[k]), e.e0[k]);
          chk("o1", int'(o1[k]), e.e1[k]);
        end
        chk("two-DBU valid", int'(q_valid), 1);
        for (int k = 0; k < L; k++) begin
          chk("two-DBU o0", int'(q_o0[k]), e.e0[k]);
          chk("two-DBU o1", int'(q_o1[k]), e.e1[k]);
        end
        if (mode == MODE_CWM) begin
          chk("sbu valid", int'(s_valid), 1);
          chk("sbu o0", int'(s_o0[0]), e.e0[0]);
          chk("sbu o1", int'(s_o1[0]), e.e1[0]);
        end
      end
    end
  end

  task automatic drive(bf_mode_e m, int n, int gap);
    mode = m;
    for (int i = 0; i < n; i++) begin
      exp_t e;
      @(negedge clk);
      in_valid = 1'b1;
      for (int k = 0; k < L; k++) begin
        u0[k] = coef_t'((i % 9 == 0) ? 0 : $urandom % Q);
        u1[k] = coef_t'($urandom % Q);
        v0[k] = coef_t'((i % 11 == 3) ? 0 : $urandom % Q);
        v1[k] = coef_t'((i % 5 == 2) ? Q - 1 : $urandom % Q);
        w[k]  = coef_t'($urandom % Q);
        unique case (m)
          MODE_NTT: begin
            e.e0[k] = (int'(u0[k]) + mm(int'(w[k]), int'(v0[k]))) % Q;
            e.e1[k] = (int'(u0[k]) + Q - mm(int'(w[k]), int'(v0[k]))) % Q;
          end
          MODE_INTT: begin
            e.e0[k] = half((int'(u0[k]) + int'(v0[k])) % Q);
            e.e1[k] = half(mm(int'(w[k]), (int'(v0[k]) + Q - int'(u0[k])) % Q));
          end
          default: begin
            e.e0[k] = (mm(int'(u0[k]), int'(v0[k])) +
                       mm(mm(int'(u1[k]), int'(v1[k])), int'(w[k]))) % Q;
            e.e1[k] = (mm(int'(u0[k]), int'(v1[k])) + mm(int'(u1[k]), int'(v0[k]))) % Q;
          end
        endcase
      end
      e.t = cyc + ((m == MODE_CWM) ? 10 : 6);
      q_exp.push_back(e);
      for (int g = 1; g < gap; g++) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (14) @(negedge clk);
    chk("all results seen", q_exp.size(), 0);
  endtask

  initial begin
    u0 = '0; u1 = '0; v0 = '0; v1 = '0; w = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    drive(MODE_NTT, 300, 1);
    drive(MODE_INTT, 300, 1);
    drive(MODE_CWM, 200, 5);
    drive(MODE_NTT, 50, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
