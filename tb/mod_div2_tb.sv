// mod_div2_tb: exhaustively checks the modular halving: for every a in
// 0..q-1 the result y must be below q and satisfy 2*y mod 3329 = a.
module mod_div2_tb;
  import kyber_pkg::*;

  coef_t a, y;
  int checks = 0, failures = 0;

  mod_div2 dut (.*);

  initial begin
    for (int i = 0; i < Q; i++) begin
      a = coef_t'(i);
      #1;
      checks++;
      if (int'(y) >= Q || (2 * int'(y)) % Q != i) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d y=%0d", i, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
