// rns_add_rom_tb: exhaustively checks the three addition tables of the
// multiplier (mod 7 without marker, mod 31 with the zero marker, mod 32) on
// both ports: (x + y) mod M for residues, M when either input is the marker.
module rns_add_rom_tb;

  logic clk = 1'b0;
  logic [4:0] xa = '0, ya = '0, xb = '0, yb = '0;
  logic [4:0] s31a, s31b, s32a, s32b;
  logic [2:0] s7a, s7b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rns_add_rom dut (.clk, .xa, .ya, .xb, .yb, .sa(s31a), .sb(s31b));
  rns_add_rom #(.MOD(32), .W(5), .ZERO_MARK(1'b0)) u32 (.clk, .xa, .ya, .xb, .yb, .sa(s32a), .sb(s32b));
  rns_add_rom #(.MOD(7), .W(3), .ZERO_MARK(1'b0)) u7 (.clk, .xa(xa[2:0]), .ya(ya[2:0]),
                                                     .xb(xb[2:0]), .yb(yb[2:0]), .sa(s7a), .sb(s7b));

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int e31(int x, int y);
    if (x == 31 || y == 31) return 31;
    return (x + y) % 31;
  endfunction

  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++) begin
        @(negedge clk);
        xa = 5'(x); ya = 5'(y); xb = 5'(y); yb = 5'(31 - x);
        @(posedge clk);
        #1;
        chk("mod31 a", int'(s31a), e31(x, y));
        chk("mod31 b", int'(s31b), e31(y, 31 - x));
        chk("mod32 a", int'(s32a), (x + y) % 32);
        chk("mod32 b", int'(s32b), (y + 31 - x) % 32);
        if (x < 7 && y < 7) chk("mod7 a", int'(s7a), (x + y) % 7);
        if (y % 8 < 7 && (31 - x) % 8 < 7) chk("mod7 b", int'(s7b), (y % 8 + (31 - x) % 8) % 7);
      end
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
