// mod_sub_tb: drives a new operand pair on every clock (corner values 0, 1,
// q-1 and random residues) and checks each result, (a - b) mod 3329,
// exactly 2 clocks later.
module mod_sub_tb;
  import kyber_pkg::*;

  logic  clk = 1'b0;
  coef_t a = '0, b = '0, d;
  int checks = 0, failures = 0;
  int exp_q [3];

  always #5 clk = ~clk;

  mod_sub dut (.*);

  function automatic coef_t pick(int i);
    unique case (i % 5)
      0: return '0;
      1: return 12'd1;
      2: return 12'(Q - 1);
      default: return 12'($urandom % Q);
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int a_i, b_i;
      @(negedge clk);
      if (n >= 3) begin
        checks++;
        if (int'(d) != exp_q[2]) begin
          failures++;
          if (failures < 10) $display("FAIL got %0d expected %0d", d, exp_q[2]);
        end
      end
      a = (n < 50) ? pick(n) : coef_t'($urandom % Q);
      b = (n < 50) ? pick(n / 5) : coef_t'($urandom % Q);
      a_i = int'(a);
      b_i = int'(b);
      exp_q[2] = exp_q[1];
      exp_q[1] = (a_i + Q - b_i) % Q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
