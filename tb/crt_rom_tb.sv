// crt_rom_tb: checks every entry of the reconstruction table. The expected
// value is found without the CRT formula: a table from residue triple to the
// number k in 0..6943 with those residues is built by counting, and the entry
// must be 3^(k mod 3328) mod 3329 (by repeated multiplication), or 0 in the
// marker column r2 = 31.
module crt_rom_tb;
  import kyber_pkg::*;

  logic  clk = 1'b0;
  rns_t  addr_a = '0, addr_b = '0;
  coef_t z_a, z_b;
  int checks = 0, failures = 0;
  int kof [8192];
  int pw [3328];

  always #5 clk = ~clk;

  crt_rom dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int expect_z(int r1, int r2, int r3);
    if (r2 == 31) return 0;
    return pw[kof[r1 * 1024 + r2 * 32 + r3] % 3328];
  endfunction

  initial begin
    pw[0] = 1;
    for (int i = 1; i < 3328; i++) pw[i] = (pw[i-1] * 3) % Q;
    for (int k = 0; k < 6944; k++) kof[(k % 7) * 1024 + (k % 31) * 32 + (k % 32)] = k;
    for (int r1 = 0; r1 < 7; r1++)
      for (int r2 = 0; r2 < 32; r2++)
        for (int r3 = 0; r3 < 32; r3++) begin
          @(negedge clk);
          addr_a = '{r1: 3'(r1), r2: 5'(r2), r3: 5'(r3)};
          addr_b = '{r1: 3'(6 - r1), r2: 5'(r3), r3: 5'(r2)};
          @(posedge clk);
          #1;
          chk("port a", int'(z_a), expect_z(r1, r2, r3));
          chk("port b", int'(z_b), expect_z(6 - r1, r3, r2));
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
