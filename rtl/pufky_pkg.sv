// pufky_pkg: constants, types and constant functions shared by the PUF-based
// key generator.
//
// Holds the reference configuration (16 batches of 53 ring oscillators,
// 42-bit responses, a (7,1,3) repetition code concatenated with a shortened
// (318,174,17) BCH code over GF(2^9), SPONGENT-128 as entropy accumulator),
// the GF(2^9) arithmetic used by the BCH blocks, a constant function that
// derives the BCH generator polynomial, and the SPONGENT S-box and bit
// permutation.
//
// The code sizes, batch counts and key length follow the reference design.
// The field polynomial x^9+x^4+1, the Lehmer coefficient packing and the
// SPONGENT round details are choices of this implementation (the last taken
// from the published SPONGENT-128/128/8 definition).
package pufky_pkg;

  // ---------------------------------------------------------------- ROPUF
  localparam int unsigned ROPUF_B     = 16;   // batches (parallel counters)
  localparam int unsigned ROPUF_A     = 53;   // oscillators per batch
  localparam int unsigned ROPUF_CNT_W = 16;   // frequency counter width
  localparam int unsigned ROPUF_LY    = 49;   // Lehmer-Gray length l'
  localparam int unsigned ROPUF_LX    = 42;   // compressed response length l

  // Width of Lehmer coefficient L_j (j = 1..b-1): ceil(log2(j+1)).
  function automatic int unsigned lehmer_w(int unsigned j);
    int unsigned w;
    w = 0;
    while ((1 << w) < (j + 1)) w++;
    return w;
  endfunction

  // Bit offset of coefficient L_j inside the packed Lehmer-Gray vector Y.
  function automatic int unsigned lehmer_off(int unsigned j);
    int unsigned o;
    o = 0;
    for (int unsigned i = 1; i < j; i++) o += lehmer_w(i);
    return o;
  endfunction

  // ----------------------------------------------------------- repetition
  localparam int unsigned REP_N      = 7;                 // C_REP(7,1,3)
  localparam int unsigned REP_BLOCKS = ROPUF_LX / REP_N;  // 6 per response

  // ------------------------------------------------------- GF(2^u) / BCH
  localparam int unsigned GF_U   = 9;
  localparam int unsigned GF_Q1  = (1 << GF_U) - 1;       // 511, field order - 1
  localparam logic [GF_U:0] GF_POLY = 10'h211;            // x^9 + x^4 + 1
  typedef logic [GF_U-1:0] gf_t;

  localparam int unsigned BCH_N  = 318;                   // shortened length
  localparam int unsigned BCH_T  = 17;
  localparam int unsigned BCH_NK = 144;                   // n - k = 16 * 9
  localparam int unsigned BCH_K  = BCH_N - BCH_NK;        // 174

  function automatic gf_t gf_mul_alpha(gf_t a);
    logic [GF_U:0] s;
    s = {a, 1'b0};
    if (s[GF_U]) s = s ^ GF_POLY;
    return s[GF_U-1:0];
  endfunction

  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < GF_U; i++) begin
      if (b[i]) p = p ^ aa;
      aa = gf_mul_alpha(aa);
    end
    return p;
  endfunction

  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r;
    r = gf_t'(1);
    for (int unsigned i = 0; i < (e % GF_Q1); i++) r = gf_mul_alpha(r);
    return r;
  endfunction

  // Generator polynomial of the narrow-sense binary BCH code of designed
  // distance 2t+1: the product of the minimal polynomials of alpha^1 ..
  // alpha^2t, each taken once. A minimal polynomial is the product of
  // (x - alpha^r) over the cyclotomic coset {r, 2r, 4r, ...} of its root; its
  // coefficients are 0 or 1, so the final product is a carry-less product of
  // bit vectors. Field products use log/antilog tables built first.
  // Bit i of the result is the coefficient of x^i.
  function automatic logic [GF_Q1:0] bch_gen_poly(int unsigned t);
    gf_t         alog [GF_Q1];
    int unsigned lg   [GF_Q1+1];
    logic [GF_Q1-1:0] covered;
    logic [GF_Q1:0]   g;
    gf_t a;
    a = gf_t'(1);
    for (int unsigned e = 0; e < GF_Q1; e++) begin
      alog[e] = a;
      lg[a]   = e;
      a = gf_mul_alpha(a);
    end
    covered = '0;
    g = '0;
    g[0] = 1'b1;
    for (int unsigned i = 1; i <= 2 * t; i++) begin
      if (!covered[i]) begin
        gf_t m [GF_U+1];
        logic [GF_U:0] mb;
        int unsigned r, deg;
        for (int unsigned k = 0; k <= GF_U; k++) m[k] = '0;
        m[0] = gf_t'(1);
        deg  = 0;
        r    = i;
        do begin
          covered[r] = 1'b1;
          // m(x) <- m(x) * (x + alpha^r)
          for (int unsigned k = deg + 1; k >= 1; k--)
            m[k] = m[k-1] ^ ((m[k] == '0) ? '0 : alog[(lg[m[k]] + r) % GF_Q1]);
          m[0] = (m[0] == '0) ? '0 : alog[(lg[m[0]] + r) % GF_Q1];
          deg++;
          r = (2 * r) % GF_Q1;
        end while (r != i);
        for (int unsigned k = 0; k <= GF_U; k++) mb[k] = m[k][0];
        // g(x) <- g(x) * m(x) over GF(2)
        begin
          logic [GF_Q1:0] p;
          p = '0;
          for (int unsigned k = 0; k <= GF_U; k++) if (mb[k]) p = p ^ (g << k);
          g = p;
        end
      end
    end
    return g;
  endfunction

  // ------------------------------------------------------ SPONGENT-128
  localparam int unsigned SPG_B = 136;   // state width
  localparam int unsigned SPG_R = 8;     // rate
  localparam int unsigned SPG_N = 128;   // hash length
  localparam int unsigned SPG_ROUNDS = 70;
  localparam logic [6:0] SPG_LC_INIT = 7'h7A;

  function automatic logic [3:0] spg_sbox(logic [3:0] x);
    case (x)
      4'h0: return 4'hE;  4'h1: return 4'hD;  4'h2: return 4'hB;  4'h3: return 4'h0;
      4'h4: return 4'h2;  4'h5: return 4'h1;  4'h6: return 4'h4;  4'h7: return 4'hF;
      4'h8: return 4'h7;  4'h9: return 4'hA;  4'hA: return 4'h8;  4'hB: return 4'h5;
      4'hC: return 4'h9;  4'hD: return 4'hC;  4'hE: return 4'h3;  default: return 4'h6;
    endcase
  endfunction

  // Bit j moves to position j*b/4 mod (b-1); the top bit stays.
  function automatic int unsigned spg_perm(int unsigned j);
    if (j == SPG_B - 1) return j;
    return (j * (SPG_B / 4)) % (SPG_B - 1);
  endfunction

  // Round counter LFSR, feedback polynomial x^7 + x^6 + 1.
  function automatic logic [6:0] spg_lc_next(logic [6:0] c);
    return {c[5:0], c[6] ^ c[5]};
  endfunction

  // ---------------------------------------------------- helper data RAM
  localparam int unsigned HD_W        = (REP_N - 1) * REP_BLOCKS;     // 36
  localparam int unsigned HD_BCH_WORDS = BCH_NK / HD_W;               // 4
  localparam int unsigned HD_DEPTH    = ROPUF_A + HD_BCH_WORDS;       // 57

endpackage
