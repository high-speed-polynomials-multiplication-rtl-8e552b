// kyber_pkg: constants, types and table-generating functions shared by the
// Kyber polynomial multiplier.
//
// Kyber works in Z_q[x]/(x^256+1) with q = 3329. The modular multiplier
// replaces a*b mod q by an addition of discrete logarithms to the primitive
// root 3 (g = 3^k mod q), carried out in a residue number system with the
// sub-moduli 7, 31 and 32 (7*31*32 = 6944 >= 2*(q-1)). The functions below
// compute the contents of every look-up table at elaboration/initialisation
// time, so no data file is needed. NTT twiddle factors use the Kyber root of
// unity 17, as in the Kyber specification.
package kyber_pkg;

  localparam int unsigned Q      = 3329;
  localparam int unsigned QW     = 12;      // bits per coefficient
  localparam int unsigned N      = 256;     // coefficients per polynomial
  localparam int unsigned ALPHA  = 3;       // primitive root used for the index tables
  localparam int unsigned ZETA   = 17;      // primitive 256-th root of unity (NTT twiddles)
  localparam int unsigned M1     = 7;       // RNS sub-moduli
  localparam int unsigned M2     = 31;
  localparam int unsigned M3     = 32;
  localparam int unsigned RNS_M  = M1 * M2 * M3;  // 6944
  // CRT weights of eq. (8): q_hat_j * |1/q_hat_j|_{q_j}
  localparam int unsigned CRT_W1 = 2976;
  localparam int unsigned CRT_W2 = 2016;
  localparam int unsigned CRT_W3 = 1953;
  localparam int unsigned ZMARK  = 31;      // mod-31 residue marking a zero operand

  typedef logic [QW-1:0] coef_t;

  // Accelerator configuration: one dual butterfly unit (two lanes), so two
  // coefficients share one memory word. Both polynomials (2*N/BU_LANES words)
  // are spread over NUM_BANKS = 2 banks by the parity of the word address.
  localparam int unsigned BU_LANES   = 2;
  localparam int unsigned NUM_BANKS  = 2;

  // Packed index-table word: {k mod 7, k mod 31, k mod 32}
  typedef struct packed {
    logic [2:0] r1;
    logic [4:0] r2;
    logic [4:0] r3;
  } rns_t;

  // Butterfly operating mode
  typedef enum logic [1:0] {
    MODE_NTT  = 2'd0,   // Cooley-Tukey: (X + W*Y, X - W*Y)
    MODE_INTT = 2'd1,   // Gentleman-Sande: ((X+Y)/2, W*(Y-X)/2)
    MODE_CWM  = 2'd2    // pair-wise product in Z_q[x]/(x^2 - gamma)
  } bf_mode_e;

  // Host commands of the accelerator
  typedef enum logic [2:0] {
    OP_NTT  = 3'd0,
    OP_INTT = 3'd1,
    OP_CWM  = 3'd2,
    OP_PMUL = 3'd3
  } op_e;

  // a^e mod m by square-and-multiply
  function automatic int unsigned pow_mod(int unsigned a, int unsigned e, int unsigned m);
    longint unsigned r, b, mm;
    int unsigned x;
    r  = 1;
    mm = 64'(m);
    b  = 64'(a) % mm;
    x  = e;
    while (x != 0) begin
      if (x[0]) r = (r * b) % mm;
      b = (b * b) % mm;
      x = x >> 1;
    end
    return int'(r);
  endfunction

  // bit reversal of a 7-bit index
  function automatic logic [6:0] br7(logic [6:0] k);
    logic [6:0] r;
    for (int i = 0; i < 7; i++) r[i] = k[6-i];
    return r;
  endfunction

  // Content of the reconstruction table at page r1, column r2, row r3
  function automatic coef_t crt_entry(int unsigned r1, int unsigned r2, int unsigned r3);
    int unsigned r, ri;
    if (r2 == ZMARK || r1 >= M1) return '0;
    r  = (r1 * CRT_W1 + r2 * CRT_W2 + r3 * CRT_W3) % RNS_M;  // eq. (8)
    ri = r % (Q - 1);                                      // eq. (9)
    return coef_t'(pow_mod(ALPHA, ri, Q));                 // eq. (10)
  endfunction

  // NTT twiddle zeta_i = 17^br7(i)
  function automatic coef_t zeta_entry(logic [6:0] i);
    return coef_t'(pow_mod(ZETA, int'(br7(i)), Q));
  endfunction

  // CWM constant gamma_i = 17^(2*br7(i)+1)
  function automatic coef_t gamma_entry(logic [6:0] i);
    return coef_t'(pow_mod(ZETA, 2 * int'(br7(i)) + 1, Q));
  endfunction

endpackage
