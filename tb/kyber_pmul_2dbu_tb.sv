// kyber_pmul_2dbu_tb: end-to-end test of the two-DBU version of the
// polynomial multiplier (kyber_pmul_top with LANES = 4: two dual butterfly
// units, two look-up-table multipliers in dual mode, two twiddle ROMs, four
// coefficients per 48-bit memory word).
//
// The same sequence as the test of the default version:
// 1. Loads random a and b (with some zero coefficients), runs OP_PMUL and
//    compares the product with a schoolbook negacyclic product mod 3329;
//    checks the clock count, 3*231 + 168 (+1 for the clock accepting start).
// 2. Runs OP_NTT then OP_INTT on B alone: B must come back unchanged, and
//    one transform takes 7*32 + 7 (+1) clocks.
// 3. Runs OP_NTT on A and B, OP_CWM and OP_INTT on A as separate commands and
//    checks the product again.
// A monitor checks that no transform stage reads a word before the previous
// stage has written it back. Counts how often each mechanism occurred
// (NTT, INTT and CWM issues, stage starts overlapping the previous stage's
// write-back, butterflies inside one word in the distance-2 stage, zero
// operands, loads and reads) and fails for any that never did.
module kyber_pmul_2dbu_tb;
  import kyber_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       start = 1'b0;
  op_e        op = OP_PMUL;
  logic       sel = 1'b0;
  logic       busy, done;
  logic       host_we = 1'b0, host_re = 1'b0, host_sel = 1'b0;
  logic [7:0] host_idx = '0;
  coef_t      host_wdata = '0;
  coef_t      host_rdata;
  logic       host_rvalid;

  int checks = 0, failures = 0;
  int n_intra = 0;
  int n_ntt = 0, n_intt = 0, n_cwm = 0, n_swap = 0, n_zero = 0, n_load = 0, n_read = 0;

  always #5 clk = ~clk;

  localparam int L = 4;             // lanes of the butterfly unit
  localparam int P = 128 / L;       // butterfly clocks per stage, CWM groups

  kyber_pmul_top #(.LANES(L)) dut (.*);

  int unsigned pa [256], pb [256], pc [256], rd [256];

  // mechanism counters
  always @(posedge clk) begin
    if (rst_n && dut.bf_valid) begin
      unique case (dut.bf_mode)
        MODE_NTT:  n_ntt++;
        MODE_INTT: n_intt++;
        default:   n_cwm++;
      endcase
      if (dut.bf_mode != MODE_CWM && (dut.bf_v0[0] == 0 || dut.bf_w[0] == 0)) n_zero++;
    end
    if (rst_n && dut.u_ctrl.iss_bf && dut.u_ctrl.t_iss == 0 && dut.u_ctrl.stage != 0 && dut.bf_ovalid) n_swap++;
    if (rst_n && dut.bf_valid && dut.u_ctrl.intra_q) n_intra++;
    if (host_we) n_load++;
    if (host_rvalid) n_read++;
  end

  // Read-after-write monitor for the back-to-back stage schedule: a word read
  // by a transform stage is pending until its result is written back; a read
  // of a pending word would fetch a stale value from the previous stage.
  logic pending [256];
  int   n_hazard = 0, n_rw = 0;
  always @(posedge clk) begin
    if (!rst_n || !dut.u_ctrl.running || dut.u_ctrl.mode == MODE_CWM) begin
      for (int i = 0; i < 256; i++) pending[i] = 1'b0;
    end else begin
      for (int p = 0; p < 2; p++)
        if (dut.u_ctrl.rd_en[p] && pending[dut.u_ctrl.rd_addr[p]]) n_hazard++;
      for (int p = 0; p < 2; p++)
        if (dut.u_ctrl.wr_en[p]) begin
          if (!pending[dut.u_ctrl.wr_addr[p]]) n_hazard++;
          pending[dut.u_ctrl.wr_addr[p]] = 1'b0;
          n_rw++;
        end
      for (int p = 0; p < 2; p++)
        if (dut.u_ctrl.rd_en[p]) pending[dut.u_ctrl.rd_addr[p]] = 1'b1;
    end
  end

  task automatic check(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic void schoolbook();
    longint unsigned acc [256];
    for (int i = 0; i < 256; i++) acc[i] = 0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        longint unsigned p;
        p = longint'(pa[i]) * longint'(pb[j]) % Q;
        if (i + j < 256) acc[i+j]     = (acc[i+j] + p) % Q;
        else             acc[i+j-256] = (acc[i+j-256] + Q - p) % Q;
      end
    for (int i = 0; i < 256; i++) pc[i] = int'(acc[i]);
  endfunction

  task automatic load(logic s, ref int unsigned v [256]);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      host_we = 1'b1; host_sel = s; host_idx = 8'(i); host_wdata = coef_t'(v[i]);
    end
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic readback(logic s);
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      host_re = 1'b1; host_sel = s; host_idx = 8'(i);
      @(posedge clk);
      #1 rd[i] = host_rdata;
      host_re = 1'b0;
      if (!host_rvalid) begin failures++; $display("FAIL host_rvalid low"); end
    end
  endtask

  task automatic run(op_e o, logic s, output int cycles);
    @(negedge clk);
    op = o; sel = s; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  // Clocks from the edge that accepts start to the edge that raises done:
  // 7*P issue clocks + 7 per transform, 5*P + 8 for the CWM, plus the
  // accepting edge.
  localparam int T_XFORM = 7 * P + 7;
  localparam int T_CWM   = 5 * P + 8;

  initial begin
    int cyc, c1, c2, c3, c4;
    for (int i = 0; i < 256; i++) begin
      pa[i] = (i % 37 == 5) ? 0 : $urandom % Q;
      pb[i] = (i % 41 == 7) ? 0 : $urandom % Q;
    end
    pa[255] = Q - 1; pb[0] = Q - 1;
    schoolbook();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. full multiplication
    load(1'b0, pa);
    load(1'b1, pb);
    run(OP_PMUL, 1'b0, cyc);
    check("PMUL clocks", cyc, 3 * T_XFORM + T_CWM + 1);
    $display("PMUL: %0d clocks", cyc);
    readback(1'b0);
    for (int i = 0; i < 256; i++) check($sformatf("product[%0d]", i), rd[i], pc[i]);

    // 2. NTT then INTT of b gives b back
    load(1'b1, pb);
    run(OP_NTT, 1'b1, c1);
    check("NTT clocks", c1, T_XFORM + 1);
    run(OP_INTT, 1'b1, c2);
    check("INTT clocks", c2, T_XFORM + 1);
    readback(1'b1);
    for (int i = 0; i < 256; i++) check($sformatf("roundtrip[%0d]", i), rd[i], pb[i]);

    // 3. the same product from separate commands
    load(1'b0, pa);
    run(OP_NTT, 1'b0, c1);
    run(OP_NTT, 1'b1, c2);
    run(OP_CWM, 1'b0, c3);
    check("CWM clocks", c3, T_CWM + 1);
    run(OP_INTT, 1'b0, c4);
    readback(1'b0);
    for (int i = 0; i < 256; i++) check($sformatf("product2[%0d]", i), rd[i], pc[i]);

    // mechanisms
    $display("NTT butterflies %0d, INTT butterflies %0d, CWM issues %0d, overlapped stage starts %0d, zero operands %0d, loads %0d, reads %0d",
             n_ntt, n_intt, n_cwm, n_swap, n_zero, n_load, n_read);
    check("NTT used",  32'(n_ntt  > 0), 1);
    check("INTT used", 32'(n_intt > 0), 1);
    check("CWM used",  32'(n_cwm  > 0), 1);
    check("overlapped stages", 32'(n_swap > 0), 1);
    check("zero ops",  32'(n_zero > 0), 1);
    check("loads",     32'(n_load > 0), 1);
    check("reads",     32'(n_read > 0), 1);
    check("intra-word stage used", 32'(n_intra > 0), 1);
    check("intra-word stage issues", n_intra, 8 * P);
    check("read-after-write hazards", n_hazard, 0);
    check("write-backs seen", n_rw, 2 * (n_ntt + n_intt));
    check("NTT issue count", n_ntt, 5 * 7 * P);
    check("CWM group count", n_cwm, 2 * P);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
