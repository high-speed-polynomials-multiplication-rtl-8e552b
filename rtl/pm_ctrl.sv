// pm_ctrl: control unit of the polynomial multiplier with a butterfly unit
// of LANES lanes: 2 for the dual butterfly unit (DBU, the default), 1 for the
// single butterfly unit (SBU), 4 for two DBUs.
//
// It sequences the operations of NTT-based multiplication in Kyber's ring
// Z_3329[x]/(x^256+1) and generates every memory and twiddle address:
//  * NTT (7 Cooley-Tukey stages, butterfly distance m = 128..2) and INTT
//    (7 Gentleman-Sande stages, m = 2..128, halving at every stage) of
//    polynomial A or B, in place. A memory word holds LANES neighbouring
//    coefficients. Each clock one word holding X = c[j..j+LANES-1] and one
//    holding Y = c[j+m..j+m+LANES-1] are read: because m >= LANES the lanes
//    always work on neighbouring butterflies of one block and share one
//    twiddle factor. Results go back to the same two words 7 clocks later.
//    With four lanes the distance-2 stage (last of the NTT, first of the
//    INTT) is smaller than a word: clock t then reads words 2t and 2t+1, each
//    holding two whole butterflies (c0,c2), (c1,c3) of its own block, so the
//    two DBUs use two different twiddles.
//  * CWM: A <- A * B in the NTT domain. A group of 5 clocks reads two A words
//    and then two B words and starts one degree-1 product per lane: with
//    two lanes each word holds one pair (a0, a1); with one lane the two
//    words are a0 and a1 of one pair.
//  * PMUL: NTT(A), NTT(B), CWM, INTT(A): A becomes the product a*b.
//
// Memory: the 2*256/LANES words of both polynomials (A at word addresses
// 0.., B in opposite order from the top) are spread over two banks by
// address parity. The two words read (or written) in one clock always differ
// in exactly one address bit and so sit in different banks, which lets two
// simple dual-port banks serve two reads and two writes per clock. The
// stages of a transform are issued back to back without waiting: with the
// 7-clock read-to-write latency, every word a stage reads has already been
// written by the previous stage (an assertion checks the clock of the
// write itself). Opposite order for B and coefficient packing follow the
// reference architecture; the parity interleaving is this design's choice.
//
// Host side: while idle, host_we writes one coefficient of polynomial
// host_sel and host_re reads one (host_rdata valid one clock later, with
// host_rvalid). start with op/sel launches an operation; busy is high until
// the clock in which done pulses.
//
// Latency, counted from the clock edge that accepts start to the edge
// raising done, with P = 128/LANES butterfly clocks per stage:
// NTT or INTT 7*P + 7 clocks, CWM 5*P + 8 clocks; PMUL runs its steps one
// after the other. DBU: 455, 328 and 1693 clocks; SBU: 903, 648 and 3357;
// two DBUs: 231, 168 and 861. The twiddle ports (TWP = 2, or 4 with four
// lanes) serve one twiddle per clock in butterfly stages (two in the
// distance-2 stage with four lanes) and one CWM constant per lane.
module pm_ctrl
  import kyber_pkg::*;
#(
  parameter int unsigned LANES = BU_LANES,
  localparam int unsigned DEPTH = N / LANES,            // words per bank
  localparam int unsigned BAW   = $clog2(DEPTH),        // bank row address
  localparam int unsigned WW    = LANES * QW,           // word width
  localparam int unsigned TWP   = (LANES > 2) ? LANES : 2  // twiddle read ports
) (
  input  logic          clk,
  input  logic          rst_n,
  // command
  input  logic          start,
  input  op_e           op,
  input  logic          sel,          // 0: polynomial A, 1: polynomial B
  output logic          busy,
  output logic          done,
  // coefficient access while idle
  input  logic          host_we,
  input  logic          host_re,
  input  logic          host_sel,
  input  logic [7:0]    host_idx,
  input  coef_t         host_wdata,
  output coef_t         host_rdata,
  output logic          host_rvalid,
  // memory banks
  output logic [BAW-1:0]   bank_raddr [NUM_BANKS],
  output logic [BAW-1:0]   bank_waddr [NUM_BANKS],
  output logic [LANES-1:0] bank_we    [NUM_BANKS],
  output logic [WW-1:0]    bank_wdata [NUM_BANKS],
  input  logic [WW-1:0]    bank_rdata [NUM_BANKS],
  // twiddle ROM
  output logic [7:0]    tw_addr [TWP],
  input  coef_t         tw_data [TWP],
  // butterfly unit
  output bf_mode_e      bf_mode,
  output logic          bf_valid,
  output coef_t [LANES-1:0] bf_u0,
  output coef_t [LANES-1:0] bf_u1,
  output coef_t [LANES-1:0] bf_v0,
  output coef_t [LANES-1:0] bf_v1,
  output coef_t [LANES-1:0] bf_w,
  input  logic          bf_ovalid,
  input  coef_t [LANES-1:0] bf_o0,
  input  coef_t [LANES-1:0] bf_o1
);

  localparam int unsigned OPS_PER_STAGE = N / (2 * LANES); // clocks per stage (P)
  localparam int unsigned STAGES        = 7;
  localparam int unsigned PAW           = BAW + 1;          // word address over both banks
  localparam int unsigned TW            = $clog2(OPS_PER_STAGE);
  localparam int unsigned LSH           = $clog2(LANES);    // coefficient index -> word
  localparam int unsigned HALF          = (LANES > 1) ? LANES / 2 : 1;  // CWM pairs per word

  typedef logic [PAW-1:0] paddr_t;
  typedef logic [PAW-2:0] waddr_t;   // word within one polynomial
  typedef logic [TW-1:0]  opcnt_t;

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e     state;
  logic       pmul;          // running the PMUL sequence
  logic [1:0] seq;           // PMUL step
  bf_mode_e   mode;          // current step
  logic       psel;          // polynomial of the current step
  logic [2:0] stage;         // stage being issued
  opcnt_t     t_iss;         // butterfly clock (or CWM group) being issued
  logic       iss_done;      // everything of this step issued
  logic [2:0] ph;            // CWM phase within a group of 5 clocks
  logic [2:0] wr_stage;      // stage being written back
  opcnt_t     t_wr;          // result being written back

  // ---------------- address arithmetic ----------------
  // Word address over both banks: A ascending, B in opposite order.
  function automatic paddr_t phys(logic p, waddr_t w);
    return p ? ~{1'b0, w} : {1'b0, w};
  endfunction

  // Bank of a word: parity of its address. Words whose addresses differ in
  // one bit (every butterfly pair, every CWM pair of reads) land in
  // different banks.
  function automatic logic bank_of(paddr_t a);
    return ^a;
  endfunction

  // log2 of the butterfly distance of a stage
  function automatic int unsigned log_m(bf_mode_e md, logic [2:0] s);
    return (md == MODE_INTT) ? int'(s) + 1 : 7 - int'(s);
  endfunction

  // Index j of the first coefficient handled in butterfly clock t
  function automatic int unsigned first_j(bf_mode_e md, logic [2:0] s, opcnt_t t);
    int unsigned b, lm;
    b  = LANES * int'(t);
    lm = log_m(md, s);
    return ((b >> lm) << (lm + 1)) | (b & ((1 << lm) - 1));
  endfunction

  function automatic waddr_t x_word(bf_mode_e md, logic [2:0] s, opcnt_t t);
    return waddr_t'(first_j(md, s, t) >> LSH);
  endfunction

  function automatic waddr_t y_word(bf_mode_e md, logic [2:0] s, opcnt_t t);
    return waddr_t'((first_j(md, s, t) + (1 << log_m(md, s))) >> LSH);
  endfunction

  // Twiddle index of block blk of stage s: Kyber order, k counting up for
  // the NTT and down for the INTT
  function automatic logic [7:0] tw_index(bf_mode_e md, logic [2:0] s, int unsigned blk);
    if (md == MODE_INTT) return 8'((128 >> s) - 1 - blk);
    else                 return 8'((1 << s) + blk);
  endfunction

  function automatic int unsigned first_blk(bf_mode_e md, logic [2:0] s, opcnt_t t);
    return (LANES * int'(t)) >> log_m(md, s);   // butterfly index / m
  endfunction

  // Stage whose butterfly distance is smaller than a word (only with four
  // lanes, distance 2): clock t reads words 2t and 2t+1, and each word holds
  // two complete butterflies of its own block, (c0, c2) and (c1, c3).
  function automatic logic intra(bf_mode_e md, logic [2:0] s);
    return (1 << log_m(md, s)) < LANES;
  endfunction

  // ---------------- issue side ----------------
  logic        running, iss_bf, iss_c0, iss_c1;
  logic        rd_v, c0_v, c1_v;          // read data arriving this clock
  logic        xb_q;                      // bank that returned the first word
  logic [WW-1:0] rd_first, rd_second;     // first / second word read last clock
  logic [WW-1:0] hold0, hold1;            // the two A words of a CWM group
  logic        last_wr;
  logic        h_rd, h_bank;
  logic [7:0]  h_lane;
  logic        intra_q;                   // read data belongs to an intra-word stage
  logic        intra_wr;                  // write-back of an intra-word stage

  assign running = (state == S_RUN);
  assign iss_bf  = running && !iss_done && (mode != MODE_CWM);
  assign iss_c0  = running && !iss_done && (mode == MODE_CWM) && (ph == 3'd0);
  assign iss_c1  = running && !iss_done && (mode == MODE_CWM) && (ph == 3'd1);
  assign last_wr = bf_ovalid && (t_wr == opcnt_t'(OPS_PER_STAGE - 1)) &&
                   ((mode == MODE_CWM) || (wr_stage == 3'(STAGES - 1)));

  // two logical reads and two logical writes per clock
  logic             rd_en [2];
  paddr_t           rd_addr [2];
  logic             wr_en [2];
  paddr_t           wr_addr [2];
  logic [LANES-1:0] wr_we [2];
  logic [WW-1:0]    wr_data [2];

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      rd_en[p]   = 1'b0;
      rd_addr[p] = '0;
      wr_en[p]   = 1'b0;
      wr_addr[p] = '0;
      wr_we[p]   = '0;
      wr_data[p] = '0;
    end
    tw_addr = '{default: '0};

    if (iss_bf && intra(mode, stage)) begin
      rd_en      = '{default: 1'b1};
      rd_addr[0] = phys(psel, {t_iss, 1'b0});
      rd_addr[1] = phys(psel, {t_iss, 1'b1});
      tw_addr[0] = tw_index(mode, stage, 2 * int'(t_iss));
      tw_addr[1] = tw_index(mode, stage, 2 * int'(t_iss) + 1);
    end else if (iss_bf) begin
      rd_en      = '{default: 1'b1};
      rd_addr[0] = phys(psel, x_word(mode, stage, t_iss));
      rd_addr[1] = phys(psel, y_word(mode, stage, t_iss));
      tw_addr[0] = tw_index(mode, stage, first_blk(mode, stage, t_iss));
    end else if (iss_c0 || iss_c1) begin
      // clock 0 of a group: A words 2g and 2g+1; clock 1: the same B words.
      // Lane k multiplies pair LANES*g + k, whose constant is gamma at 128+.
      rd_en      = '{default: 1'b1};
      rd_addr[0] = phys(iss_c1, {t_iss, 1'b0});
      rd_addr[1] = phys(iss_c1, {t_iss, 1'b1});
      for (int k = 0; k < LANES; k++)
        tw_addr[k] = 8'(128 + LANES * int'(t_iss) + k);
    end else if (!running && host_re && !host_we) begin
      rd_en[0]   = 1'b1;
      rd_addr[0] = phys(host_sel, waddr_t'(host_idx >> LSH));
    end

    if (running && bf_ovalid) begin
      wr_en = '{default: 1'b1};
      wr_we = '{default: '1};
      if (mode == MODE_CWM) begin
        wr_addr[0] = phys(1'b0, {t_wr, 1'b0});
        wr_addr[1] = phys(1'b0, {t_wr, 1'b1});
        if (LANES == 1) begin
          wr_data[0][QW-1:0] = bf_o0[0];
          wr_data[1][QW-1:0] = bf_o1[0];
        end else begin
          // lane k: word k / HALF, pair k % HALF within it
          for (int k = 0; k < LANES; k++) begin
            wr_data[k / HALF][(2 * (k % HALF))     * QW +: QW] = bf_o0[k];
            wr_data[k / HALF][((2 * (k % HALF) + 1) % LANES) * QW +: QW] = bf_o1[k];
          end
        end
      end else if (intra_wr) begin
        wr_addr[0] = phys(psel, {t_wr, 1'b0});
        wr_addr[1] = phys(psel, {t_wr, 1'b1});
        for (int k = 0; k < LANES; k++) begin
          wr_data[k / 2][(k % 2)     * QW +: QW] = bf_o0[k];
          wr_data[k / 2][((k % 2 + 2) % LANES) * QW +: QW] = bf_o1[k];
        end
      end else begin
        wr_addr[0] = phys(psel, x_word(mode, wr_stage, t_wr));
        wr_addr[1] = phys(psel, y_word(mode, wr_stage, t_wr));
        for (int k = 0; k < LANES; k++) begin
          wr_data[0][k*QW +: QW] = bf_o0[k];
          wr_data[1][k*QW +: QW] = bf_o1[k];
        end
      end
    end else if (!running && host_we) begin
      wr_en[0]   = 1'b1;
      wr_addr[0] = phys(host_sel, waddr_t'(host_idx >> LSH));
      wr_we[0]   = LANES'(1) << (int'(host_idx) % LANES);
      wr_data[0] = {LANES{host_wdata}};
    end
  end

  // steer the logical requests onto the banks by address parity
  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++) begin
      bank_raddr[b] = '0;
      bank_waddr[b] = '0;
      bank_we[b]    = '0;
      bank_wdata[b] = '0;
      for (int p = 1; p >= 0; p--) begin
        if (rd_en[p] && bank_of(rd_addr[p]) == 1'(b)) bank_raddr[b] = rd_addr[p][PAW-1:1];
        if (wr_en[p] && bank_of(wr_addr[p]) == 1'(b)) begin
          bank_waddr[b] = wr_addr[p][PAW-1:1];
          bank_we[b]    = wr_we[p];
          bank_wdata[b] = wr_data[p];
        end
      end
    end
  end

  // ---------------- butterfly operands ----------------
  assign rd_first  = bank_rdata[xb_q];
  assign rd_second = bank_rdata[~xb_q];

  always_comb begin
    bf_mode  = mode;
    bf_valid = 1'b0;
    bf_u0 = '0; bf_u1 = '0; bf_v0 = '0; bf_v1 = '0; bf_w = '0;
    if (mode == MODE_CWM) begin
      // the B words arrive now, the A words were held from the clock before
      bf_valid = c1_v;
      if (LANES == 1) begin
        bf_u0[0] = hold0[QW-1:0];      bf_u1[0] = hold1[QW-1:0];
        bf_v0[0] = rd_first[QW-1:0];   bf_v1[0] = rd_second[QW-1:0];
      end else begin
        // lane k: word k / HALF, pair k % HALF within it
        for (int k = 0; k < LANES; k++) begin
          if (k / HALF == 0) begin
            bf_u0[k] = hold0[(2 * (k % HALF))         * QW +: QW];
            bf_u1[k] = hold0[((2 * (k % HALF) + 1) % LANES) * QW +: QW];
            bf_v0[k] = rd_first[(2 * (k % HALF))      * QW +: QW];
            bf_v1[k] = rd_first[((2 * (k % HALF) + 1) % LANES) * QW +: QW];
          end else begin
            bf_u0[k] = hold1[(2 * (k % HALF))         * QW +: QW];
            bf_u1[k] = hold1[((2 * (k % HALF) + 1) % LANES) * QW +: QW];
            bf_v0[k] = rd_second[(2 * (k % HALF))     * QW +: QW];
            bf_v1[k] = rd_second[((2 * (k % HALF) + 1) % LANES) * QW +: QW];
          end
        end
      end
      for (int k = 0; k < LANES; k++) bf_w[k] = tw_data[k];
    end else if (intra_q) begin
      // lanes 0,1: butterflies (c0,c2), (c1,c3) of the first word; lanes 2,3
      // the same in the second word, whose block has the next twiddle
      bf_valid = rd_v;
      for (int k = 0; k < LANES; k++) begin
        if (k / 2 == 0) begin
          bf_u0[k] = rd_first[(k % 2)      * QW +: QW];
          bf_v0[k] = rd_first[((k % 2 + 2) % LANES) * QW +: QW];
          bf_w[k]  = tw_data[0];
        end else begin
          bf_u0[k] = rd_second[(k % 2)     * QW +: QW];
          bf_v0[k] = rd_second[((k % 2 + 2) % LANES) * QW +: QW];
          bf_w[k]  = tw_data[1];
        end
      end
    end else begin
      bf_valid = rd_v;
      for (int k = 0; k < LANES; k++) begin
        bf_u0[k] = rd_first[k*QW +: QW];
        bf_v0[k] = rd_second[k*QW +: QW];
        bf_w[k]  = tw_data[0];
      end
    end
  end

  assign host_rdata  = bank_rdata[h_bank][int'(h_lane) * QW +: QW];
  assign host_rvalid = h_rd;
  assign intra_wr    = (mode != MODE_CWM) && intra(mode, wr_stage);
  assign busy        = running;

  // ---------------- sequencing ----------------
  always_ff @(posedge clk) begin
    xb_q    <= bank_of(rd_addr[0]);
    intra_q <= iss_bf && intra(mode, stage);
    if (c0_v) begin
      hold0 <= rd_first;
      hold1 <= rd_second;
    end
    h_lane <= 8'(host_idx % LANES);
    h_bank <= bank_of(phys(host_sel, waddr_t'(host_idx >> LSH)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pmul     <= 1'b0;
      seq      <= '0;
      mode     <= MODE_NTT;
      psel     <= 1'b0;
      stage    <= '0;
      t_iss    <= '0;
      iss_done <= 1'b0;
      ph       <= '0;
      wr_stage <= '0;
      t_wr     <= '0;
      rd_v     <= 1'b0;
      c0_v     <= 1'b0;
      c1_v     <= 1'b0;
      done     <= 1'b0;
      h_rd     <= 1'b0;
    end else begin
      done <= 1'b0;
      rd_v <= iss_bf;
      c0_v <= iss_c0;
      c1_v <= iss_c1;
      h_rd <= !running && host_re && !host_we;

      unique case (state)
        S_IDLE: begin
          if (start) begin
            state    <= S_RUN;
            stage    <= '0;
            t_iss    <= '0;
            iss_done <= 1'b0;
            ph       <= '0;
            wr_stage <= '0;
            t_wr     <= '0;
            pmul     <= (op == OP_PMUL);
            seq      <= '0;
            unique case (op)
              OP_NTT:  begin mode <= MODE_NTT;  psel <= sel;  end
              OP_INTT: begin mode <= MODE_INTT; psel <= sel;  end
              OP_CWM:  begin mode <= MODE_CWM;  psel <= 1'b0; end
              default: begin mode <= MODE_NTT;  psel <= 1'b0; end
            endcase
          end
        end

        default: begin
          // issue side: stages follow each other without a pause
          if (iss_bf) begin
            t_iss <= t_iss + 1'b1;
            if (t_iss == opcnt_t'(OPS_PER_STAGE - 1)) begin
              if (stage == 3'(STAGES - 1)) iss_done <= 1'b1;
              else                          stage    <= stage + 3'd1;
            end
          end else if (mode == MODE_CWM && !iss_done) begin
            if (ph == 3'd4) begin
              ph    <= '0;
              t_iss <= t_iss + 1'b1;
              if (t_iss == opcnt_t'(OPS_PER_STAGE - 1)) iss_done <= 1'b1;
            end else begin
              ph <= ph + 3'd1;
            end
          end

          // write-back side
          if (bf_ovalid) begin
            t_wr <= t_wr + 1'b1;
            if (t_wr == opcnt_t'(OPS_PER_STAGE - 1)) wr_stage <= wr_stage + 3'd1;
          end

          // end of the step
          if (last_wr) begin
            stage    <= '0;
            t_iss    <= '0;
            iss_done <= 1'b0;
            ph       <= '0;
            wr_stage <= '0;
            t_wr     <= '0;
            if (pmul && seq != 2'd3) begin
              seq <= seq + 2'd1;
              unique case (seq)
                2'd0:    begin mode <= MODE_NTT;  psel <= 1'b1; end
                2'd1:    begin mode <= MODE_CWM;  psel <= 1'b0; end
                default: begin mode <= MODE_INTT; psel <= 1'b0; end
              endcase
            end else begin
              state <= S_IDLE;
              pmul  <= 1'b0;
              done  <= 1'b1;
            end
          end
        end
      endcase
    end
  end

  // The two words read (written) in one clock must sit in different banks
  a_read_banks: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_en[0] && rd_en[1]) |-> (bank_of(rd_addr[0]) != bank_of(rd_addr[1])))
    else $error("pm_ctrl: two reads on one bank");
  a_write_banks: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_en[0] && wr_en[1]) |-> (bank_of(wr_addr[0]) != bank_of(wr_addr[1])))
    else $error("pm_ctrl: two writes on one bank");
  // A word read by a stage must not be the one its predecessor is writing now
  for (genvar p = 0; p < 2; p++) begin : g_raw
    for (genvar q = 0; q < 2; q++) begin : g_wr
      a_no_raw: assert property (@(posedge clk) disable iff (!rst_n)
        (rd_en[p] && wr_en[q] && running) |-> (rd_addr[p] != wr_addr[q]))
        else $error("pm_ctrl: word read while it is being written");
    end
  end

endmodule
