// pm_ctrl_tb: tests the control unit with the real memory banks and twiddle
// ROM but an ideal behavioural butterfly unit (bf_model), so that address
// generation, bank interleaving and sequencing are checked on their own:
//  * OP_NTT of A against a reference Kyber NTT computed here,
//  * OP_INTT of A against a reference inverse NTT (with the 1/128 scaling),
//  * OP_CWM against reference pair-wise products,
// each with its clock count (455 or 328 clocks after the accepting clock).
module pm_ctrl_tb;
  import kyber_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0;
  op_e         op = OP_NTT;
  logic        sel = 1'b0;
  logic        busy, done;
  logic        host_we = 1'b0, host_re = 1'b0, host_sel = 1'b0;
  logic [7:0]  host_idx = '0;
  coef_t       host_wdata = '0, host_rdata;
  logic        host_rvalid;
  logic [6:0]  bank_raddr [NUM_BANKS], bank_waddr [NUM_BANKS];
  logic [1:0]  bank_we    [NUM_BANKS];
  logic [23:0] bank_wdata [NUM_BANKS], bank_rdata [NUM_BANKS];
  logic [7:0]  tw_addr [2];
  coef_t       tw_data [2];
  bf_mode_e    bf_mode;
  logic        bf_valid, bf_ovalid;
  coef_t [1:0] bf_u0, bf_u1, bf_v0, bf_v1, bf_w, bf_o0, bf_o1;

  int checks = 0, failures = 0;
  int unsigned pa [256], pb [256], ref_c [256], rd [256];

  always #5 clk = ~clk;

  pm_ctrl dut (.*);
  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    poly_bank u_bank (.clk, .raddr(bank_raddr[b]), .waddr(bank_waddr[b]), .we(bank_we[b]),
                      .wdata(bank_wdata[b]), .rdata(bank_rdata[b]));
  end
  twiddle_rom u_tw (.clk, .addr_a(tw_addr[0]), .addr_b(tw_addr[1]),
                    .data_a(tw_data[0]), .data_b(tw_data[1]));
  bf_model u_bf (.clk, .rst_n, .mode(bf_mode), .in_valid(bf_valid), .u0(bf_u0), .u1(bf_u1),
                 .v0(bf_v0), .v1(bf_v1), .w(bf_w), .out_valid(bf_ovalid), .o0(bf_o0), .o1(bf_o1));

  // clocks after the accepting clock: 7 stages of 64 issue clocks back to
  // back plus the pipeline; CWM: 64 groups of 5 clocks plus the pipeline
  localparam int T_XFORM = 7 * 64 + 7;
  localparam int T_CWM   = 64 * 5 + 8;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int pw17(int e);
    int r = 1;
    for (int i = 0; i < e; i++) r = (r * 17) % Q;
    return r;
  endfunction

  function automatic int rev7(int k);
    int r = 0;
    for (int i = 0; i < 7; i++) if ((k >> i) & 1) r |= 1 << (6 - i);
    return r;
  endfunction

  // Kyber forward NTT (7 layers, lengths 128..2)
  function automatic void ref_ntt(ref int unsigned f [256]);
    int i = 1;
    for (int len = 128; len >= 2; len /= 2)
      for (int s = 0; s < 256; s += 2 * len) begin
        int z = pw17(rev7(i));
        i++;
        for (int j = s; j < s + len; j++) begin
          int t = (z * int'(f[j + len])) % Q;
          f[j + len] = (f[j] + Q - t) % Q;
          f[j]       = (f[j] + t) % Q;
        end
      end
  endfunction

  // Kyber inverse NTT, scaled by 128^-1 = 3303
  function automatic void ref_intt(ref int unsigned f [256]);
    int i = 127;
    for (int len = 2; len <= 128; len *= 2)
      for (int s = 0; s < 256; s += 2 * len) begin
        int z = pw17(rev7(i));
        i--;
        for (int j = s; j < s + len; j++) begin
          int t = int'(f[j]);
          f[j]       = (t + f[j + len]) % Q;
          f[j + len] = (z * ((int'(f[j + len]) + Q - t) % Q)) % Q;
        end
      end
    for (int j = 0; j < 256; j++) f[j] = (f[j] * 3303) % Q;
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
    end
  endtask

  task automatic run(op_e o, logic s, int exp_clocks);
    int cycles;
    @(negedge clk);
    op = o; sel = s; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!done) begin
      chk("busy", int'(busy), 1);
      @(negedge clk);
      cycles++;
    end
    chk("clocks", cycles, exp_clocks);
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      pa[i] = $urandom % Q;
      pb[i] = $urandom % Q;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load(1'b0, pa);
    load(1'b1, pb);

    // NTT of A
    run(OP_NTT, 1'b0, T_XFORM);
    ref_ntt(pa);
    readback(1'b0);
    for (int i = 0; i < 256; i++) chk($sformatf("ntt[%0d]", i), rd[i], pa[i]);

    // NTT of B, then CWM
    run(OP_NTT, 1'b1, T_XFORM);
    ref_ntt(pb);
    readback(1'b1);
    for (int i = 0; i < 256; i++) chk($sformatf("nttb[%0d]", i), rd[i], pb[i]);
    run(OP_CWM, 1'b0, T_CWM);
    for (int i = 0; i < 128; i++) begin
      int g, a0, a1, b0, b1;
      g  = pw17(2 * rev7(i) + 1);
      a0 = int'(pa[2*i]);
      a1 = int'(pa[2*i+1]);
      b0 = int'(pb[2*i]);
      b1 = int'(pb[2*i+1]);
      ref_c[2*i]   = ((a0 * b0) % Q + (((a1 * b1) % Q) * g) % Q) % Q;
      ref_c[2*i+1] = ((a0 * b1) % Q + (a1 * b0) % Q) % Q;
    end
    readback(1'b0);
    for (int i = 0; i < 256; i++) chk($sformatf("cwm[%0d]", i), rd[i], ref_c[i]);
    readback(1'b1);
    for (int i = 0; i < 256; i++) chk($sformatf("b kept[%0d]", i), rd[i], pb[i]);

    // INTT of A
    run(OP_INTT, 1'b0, T_XFORM);
    ref_intt(ref_c);
    readback(1'b0);
    for (int i = 0; i < 256; i++) chk($sformatf("intt[%0d]", i), rd[i], ref_c[i]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
