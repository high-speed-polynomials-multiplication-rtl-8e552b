// poly_bank_tb: random reads and writes (full-word and single-coefficient)
// on the bank, checked against a model array; a read of the word written on
// the same edge must return the old contents.
module poly_bank_tb;
  import kyber_pkg::*;

  logic      clk = 1'b0;
  localparam int unsigned DEPTH = N / BU_LANES;
  typedef logic [BU_LANES*QW-1:0] word_t;
  typedef logic [$clog2(DEPTH)-1:0] waddr_t;
  struct packed {
    waddr_t raddr;
    waddr_t waddr;
    logic [BU_LANES-1:0] we;
    word_t wdata;
  } req = '0;
  word_t     rdata;
  int checks = 0, failures = 0;
  word_t model [DEPTH];
  word_t exp_r;
  logic  chk_r;

  always #5 clk = ~clk;

  poly_bank dut (.clk, .raddr(req.raddr), .waddr(req.waddr), .we(req.we), .wdata(req.wdata), .rdata);

  initial begin
    chk_r = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      req.we    = '1;
      req.waddr = waddr_t'(i);
      req.wdata = word_t'($urandom);
      model[i]  = req.wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (chk_r) begin
        checks++;
        if (rdata != exp_r) begin
          failures++;
          if (failures < 10) $display("FAIL read %h expected %h", rdata, exp_r);
        end
      end
      req.raddr = waddr_t'($urandom);
      req.waddr = (n % 7 == 0) ? req.raddr : waddr_t'($urandom);
      req.we    = ($urandom % 2 == 0) ? 2'($urandom) : '0;
      req.wdata = word_t'($urandom);
      exp_r = model[req.raddr];
      chk_r = 1'b1;
      for (int k = 0; k < BU_LANES; k++)
        if (req.we[k]) model[req.waddr][k*QW +: QW] = req.wdata[k*QW +: QW];
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
