// twiddle_rom_tb: checks all 256 constants on both ports. Expected values are
// built here by repeated multiplication with 17 and an explicit bit reversal,
// and spot-checked against the first constants of the Kyber specification
// (zeta_1 = 1729, zeta_2 = 2580, gamma_0 = 17,
// gamma_1 = 3312).
module twiddle_rom_tb;
  import kyber_pkg::*;

  logic       clk = 1'b0;
  logic [7:0] addr_a = '0, addr_b = '0;
  coef_t      data_a, data_b;
  int checks = 0, failures = 0;
  int p17 [256];
  int e [256];

  always #5 clk = ~clk;

  twiddle_rom dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int rev7(int k);
    int r = 0;
    for (int i = 0; i < 7; i++) if ((k >> i) & 1) r |= 1 << (6 - i);
    return r;
  endfunction

  initial begin
    p17[0] = 1;
    for (int i = 1; i < 256; i++) p17[i] = (p17[i-1] * 17) % Q;
    for (int i = 0; i < 128; i++) begin
      e[i]       = p17[rev7(i)];
      e[128 + i] = p17[2 * rev7(i) + 1];
    end
    chk("zeta1", e[1], 1729);
    chk("zeta2", e[2], 2580);
    chk("gamma0", e[128], 17);
    chk("gamma1", e[129], 3312);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      addr_a = 8'(i);
      addr_b = 8'(255 - i);
      @(posedge clk);
      #1;
      chk($sformatf("rom[%0d]", i), int'(data_a), e[i]);
      chk($sformatf("rom[%0d]", 255 - i), int'(data_b), e[255 - i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
