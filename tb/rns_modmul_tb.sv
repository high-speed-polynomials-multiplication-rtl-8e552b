// rns_modmul_tb: checks the look-up-table modular multiplier in dual mode.
// Every clock both ports get a new operand pair (random, plus zero, one and
// q-1 corner cases); each product is compared with a*b mod 3329 exactly
// 3 clocks later, which also checks the latency and full pipelining.
module rns_modmul_tb;
  import kyber_pkg::*;

  logic  clk = 1'b0;
  coef_t a0 = '0, b0 = '0, a1 = '0, b1 = '0;
  coef_t p0, p1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rns_modmul #(.DUAL(1'b1)) dut (.*);

  coef_t ea0 [4], ea1 [4];   // expected products, by age in clocks

  function automatic coef_t pick(int i);
    unique case (i % 7)
      0: return '0;
      1: return 12'd1;
      2: return 12'(Q - 1);
      default: return 12'($urandom % Q);
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 4; i++) begin ea0[i] = '0; ea1[i] = '0; end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (n >= 4) begin
        checks += 2;
        if (p0 != ea0[3]) begin failures++; if (failures < 10) $display("FAIL p0 got %0d exp %0d", p0, ea0[3]); end
        if (p1 != ea1[3]) begin failures++; if (failures < 10) $display("FAIL p1 got %0d exp %0d", p1, ea1[3]); end
      end
      a0 = (n < 100) ? pick(n) : coef_t'($urandom % Q);
      b0 = (n < 100) ? pick(n / 7) : coef_t'($urandom % Q);
      a1 = coef_t'($urandom % Q);
      b1 = (n % 13 == 0) ? '0 : coef_t'($urandom % Q);
      for (int i = 3; i > 0; i--) begin ea0[i] = ea0[i-1]; ea1[i] = ea1[i-1]; end
      ea0[1] = coef_t'((int'(a0) * int'(b0)) % Q);
      ea1[1] = coef_t'((int'(a1) * int'(b1)) % Q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
