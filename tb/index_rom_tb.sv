// index_rom_tb: reads every address of the index table on both ports and
// compares the residues with a discrete-log table built here from the powers
// of 3 mod 3329, spot-checked against known logarithms (log 2 = 1134,
// log 371 = 2306, log 3328 = 1664). Address 0 must carry the mod-31 marker 31.
module index_rom_tb;
  import kyber_pkg::*;

  logic  clk = 1'b0;
  coef_t addr_a = '0, addr_b = '0;
  rns_t  res_a, res_b;
  int checks = 0, failures = 0;
  int dlog [Q];

  always #5 clk = ~clk;

  index_rom dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int p;
    // discrete logarithm by exhaustive search for a few addresses
    foreach (dlog[i]) dlog[i] = -1;
    p = 1;
    for (int k = 0; k < Q - 1; k++) begin
      dlog[p] = k;
      p = (p * 3) % Q;
    end
    chk("log 2", dlog[2], 1134);
    chk("log 371", dlog[371], 2306);
    chk("log 3328", dlog[3328], 1664);
    for (int g = 0; g < Q; g++) begin
      @(negedge clk);
      addr_a = coef_t'(g);
      addr_b = coef_t'(Q - 1 - g);
      @(posedge clk);
      #1;
      if (g == 0) begin
        chk("zero marker", int'(res_a.r2), 31);
      end else begin
        chk("r1", int'(res_a.r1), dlog[g] % 7);
        chk("r2", int'(res_a.r2), dlog[g] % 31);
        chk("r3", int'(res_a.r3), dlog[g] % 32);
      end
      if (Q - 1 - g != 0) begin
        chk("b r1", int'(res_b.r1), dlog[Q-1-g] % 7);
        chk("b r2", int'(res_b.r2), dlog[Q-1-g] % 31);
        chk("b r3", int'(res_b.r3), dlog[Q-1-g] % 32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
