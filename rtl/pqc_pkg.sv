// pqc_pkg: types, constants and arithmetic helpers shared by the multi-scheme
// PQC accelerator.
//
// The accelerator serves four schemes (Kyber, Dilithium, Falcon in its
// Peregrine form, SPHINCS+) with one shared polynomial datapath. Coefficients
// travel on a 24-bit datapath, wide enough for Dilithium's 23-bit modulus;
// in Kyber mode each 24-bit word carries two 12-bit coefficients. Both points
// follow the architecture description. The concrete moduli, roots of unity,
// Montgomery radices (2^24 unpacked, 2^12 per packed Kyber half), the opcode
// and function-code encodings and the twiddle-table layout are this design's
// own choices, taken from the standard parameter sets of the schemes.
package pqc_pkg;

  localparam int unsigned COEF_W = 24;           // datapath width
  localparam int unsigned HALF_W = 12;           // packed Kyber coefficient
  localparam int unsigned PROD_W = 2 * COEF_W;   // product width (48)

  localparam logic [COEF_W-1:0] Q_KYBER     = 24'd3329;
  localparam logic [COEF_W-1:0] Q_DILITHIUM = 24'd8380417;
  localparam logic [COEF_W-1:0] Q_FALCON    = 24'd12289;

  typedef enum logic [1:0] {
    SCH_KYBER     = 2'd0,
    SCH_DILITHIUM = 2'd1,
    SCH_FALCON    = 2'd2,
    SCH_SPHINCS   = 2'd3
  } scheme_e;

  // Security level index: Kyber 0/1/2 = 512/768/1024, Dilithium 0/1/2 =
  // 2/3/5, Falcon 0/1 = 512/1024, SPHINCS+ 0 = 256s.
  typedef logic [1:0] sec_t;

  typedef enum logic [3:0] {
    JOP_NOP   = 4'd0,
    JOP_ADD   = 4'd1,   // (x + y) mod q
    JOP_SUB   = 4'd2,   // (x - y) mod q
    JOP_MUL   = 4'd3,   // raw product x * y, 48 bits
    JOP_RED   = 4'd4,   // Montgomery reduction of the fed-back product
    JOP_MMUL  = 4'd5,   // Montgomery product x * w * R^-1 mod q
    JOP_BF_CT = 4'd6,   // Cooley-Tukey: x + w*y, x - w*y
    JOP_BF_GS = 4'd7,   // Gentleman-Sande: x + y, w*(x - y)
    JOP_AND   = 4'd8,   // bitwise x & y
    JOP_CMP   = 4'd9    // flag = (x < y) by subtraction, passes x
  } jop_e;

  typedef enum logic [2:0] {
    PF_NONE   = 3'd0,
    PF_SAMPLE = 3'd1,   // rejection sampling from the KAM stream
    PF_PMUL   = 3'd2,   // coefficient-wise Montgomery multiplication
    PF_NTT    = 3'd3,
    PF_INTT   = 3'd4,
    PF_ADD    = 3'd5,
    PF_SUB    = 3'd6
  } pfunc_e;

  // Keccak operations requested from the KAM.
  typedef enum logic [1:0] {
    KOP_SHAKE128 = 2'd0,
    KOP_SHAKE256 = 2'd1
  } kop_e;

  // Operand sources selected by the UPCU's multiplexer controls.
  typedef enum logic [1:0] {
    XS_MEM = 2'd0,      // polynomial SRAM, read port A
    XS_KAM = 2'd1,      // 64-bit word from the KAM squeeze buffer
    XS_FB  = 2'd2       // the JPAU's own previous result
  } xsrc_e;

  // Accelerator geometry (defaults: the larger configuration with 8 JPAUs).
  localparam int unsigned NSLOT = 8;      // polynomial slots in the SRAM
  localparam int unsigned NMAX  = 1024;   // largest N (Falcon-1024)
  localparam int unsigned MEM_AW = $clog2(NSLOT * NMAX);
  localparam int unsigned JPAU_LAT = 3;   // JPAU pipeline depth

  // ---------------------------------------------------------------- scheme
  function automatic logic [COEF_W-1:0] q_of(scheme_e s);
    case (s)
      SCH_KYBER:     return Q_KYBER;
      SCH_DILITHIUM: return Q_DILITHIUM;
      default:       return Q_FALCON;
    endcase
  endfunction

  // log2 of the polynomial degree N.
  function automatic int unsigned logn_of(scheme_e s, sec_t sec);
    if (s == SCH_FALCON) return (sec == 2'd0) ? 9 : 10;
    return 8;
  endfunction

  // Kyber polynomials are packed two coefficients per datapath word.
  function automatic logic packed_of(scheme_e s);
    return s == SCH_KYBER;
  endfunction

  // ------------------------------------------------------- modular helpers
  function automatic logic [COEF_W-1:0] mod_add(logic [COEF_W-1:0] a,
                                                 logic [COEF_W-1:0] b,
                                                 logic [COEF_W-1:0] q);
    logic [COEF_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return (s >= {1'b0, q}) ? COEF_W'(s - {1'b0, q}) : s[COEF_W-1:0];
  endfunction

  function automatic logic [COEF_W-1:0] mod_sub(logic [COEF_W-1:0] a,
                                                 logic [COEF_W-1:0] b,
                                                 logic [COEF_W-1:0] q);
    return (a >= b) ? a - b : COEF_W'({1'b0, a} + {1'b0, q} - {1'b0, b});
  endfunction

  // Montgomery reduction, R = 2^24: returns t * 2^-24 mod q for t < q * 2^24.
  // qinv is -q^-1 mod 2^24.
  function automatic logic [COEF_W-1:0] mont24(logic [PROD_W-1:0] t,
                                               logic [COEF_W-1:0] q,
                                               logic [COEF_W-1:0] qinv);
    logic [PROD_W-1:0] m_full;
    logic [COEF_W-1:0] m;
    logic [PROD_W:0]   s;
    logic [COEF_W:0]   u;
    m_full = PROD_W'(t[COEF_W-1:0]) * PROD_W'(qinv);
    m      = m_full[COEF_W-1:0];
    s      = {1'b0, t} + ((PROD_W+1)'(m) * (PROD_W+1)'(q));
    u      = s[PROD_W:COEF_W];
    return (u >= {1'b0, q}) ? COEF_W'(u - {1'b0, q}) : u[COEF_W-1:0];
  endfunction

  // Montgomery reduction on a packed Kyber half, R = 2^12.
  function automatic logic [HALF_W-1:0] mont12(logic [COEF_W-1:0] t,
                                               logic [HALF_W-1:0] q,
                                               logic [HALF_W-1:0] qinv);
    logic [COEF_W-1:0] m_full;
    logic [HALF_W-1:0] m;
    logic [COEF_W:0]   s;
    logic [HALF_W:0]   u;
    m_full = COEF_W'(t[HALF_W-1:0]) * COEF_W'(qinv);
    m      = m_full[HALF_W-1:0];
    s      = {1'b0, t} + ((COEF_W+1)'(m) * (COEF_W+1)'(q));
    u      = s[COEF_W:HALF_W];
    return (u >= {1'b0, q}) ? HALF_W'(u - {1'b0, q}) : u[HALF_W-1:0];
  endfunction

  // -q^-1 mod 2^bits for odd q (Newton iteration on the 2-adic inverse).
  function automatic logic [COEF_W-1:0] neg_qinv(logic [COEF_W-1:0] q,
                                                 int unsigned bits);
    logic [63:0] x, msk;
    msk = (64'd1 << bits) - 64'd1;
    x   = 64'd1;
    for (int i = 0; i < 6; i++) x = (x * (64'd2 - ((64'(q) * x) & msk))) & msk;
    return COEF_W'(((64'd1 << bits) - x) & msk);
  endfunction

  function automatic logic [COEF_W-1:0] pow_mod(logic [COEF_W-1:0] b,
                                                int unsigned e,
                                                logic [COEF_W-1:0] q);
    logic [63:0] r, x;
    r = 64'd1;
    x = 64'(b);
    for (int i = 0; i < 32; i++) begin
      if (e[i]) r = (r * x) % 64'(q);
      x = (x * x) % 64'(q);
    end
    return COEF_W'(r);
  endfunction

  function automatic int unsigned brv(int unsigned v, int unsigned bits);
    int unsigned r;
    r = 0;
    for (int i = 0; i < bits; i++) if (v[i]) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  // ------------------------------------------------------- twiddle tables
  // One table per (scheme, N): zeta^brv(k) * 2^24 mod q, k = 0 .. N/2-1
  // (Kyber: 128 entries for its 7-layer NTT). Roots: Kyber 17, Dilithium
  // 1753, Falcon-512 49, Falcon-1024 7 (primitive 256th/512th/1024th/2048th
  // roots of unity).
  localparam int unsigned TW_BASE_KYBER = 0;
  localparam int unsigned TW_BASE_DIL   = 128;
  localparam int unsigned TW_BASE_F512  = 384;
  localparam int unsigned TW_BASE_F1024 = 896;
  localparam int unsigned TW_DEPTH      = 1920;
  localparam int unsigned TW_AW         = 11;

  function automatic int unsigned tw_base(scheme_e s, sec_t sec);
    case (s)
      SCH_KYBER:     return TW_BASE_KYBER;
      SCH_DILITHIUM: return TW_BASE_DIL;
      default:       return (sec == 2'd0) ? TW_BASE_F512 : TW_BASE_F1024;
    endcase
  endfunction

  function automatic logic [COEF_W-1:0] tw_entry(int unsigned idx);
    logic [COEF_W-1:0] q, root;
    int unsigned k, bits;
    logic [63:0] v;
    if (idx < TW_BASE_DIL) begin
      q = Q_KYBER; root = 24'd17; k = idx; bits = 7;
    end else if (idx < TW_BASE_F512) begin
      q = Q_DILITHIUM; root = 24'd1753; k = idx - TW_BASE_DIL; bits = 8;
    end else if (idx < TW_BASE_F1024) begin
      q = Q_FALCON; root = 24'd49; k = idx - TW_BASE_F512; bits = 9;
    end else begin
      q = Q_FALCON; root = 24'd7; k = idx - TW_BASE_F1024; bits = 10;
    end
    v = 64'(pow_mod(root, brv(k, bits), q));
    v = (v << 24) % 64'(q);
    return COEF_W'(v);
  endfunction

  // Constant c with mont24(c * x) = x / n_layers_size, applied after the
  // inverse NTT: c = 2^24 * m^-1 mod q, m = number of butterfly points
  // (N, or N/2 for Kyber's 7-layer transform). m^-1 = m^(q-2) mod q.
  function automatic logic [COEF_W-1:0] intt_scale(scheme_e s, sec_t sec);
    logic [COEF_W-1:0] q, minv;
    int unsigned m;
    logic [63:0] v;
    q = q_of(s);
    m = 1 << logn_of(s, sec);
    if (s == SCH_KYBER) m = m / 2;
    minv = pow_mod(COEF_W'(m), int'(q) - 2, q);
    v = (64'(minv) << 24) % 64'(q);
    return COEF_W'(v);
  endfunction

endpackage
