// rijndael_ref_pkg - behavioural reference model of the Rijndael cipher for testbenches.
//
// Written independently of the RTL: GF(2^8) products use a 9-bit reduction by
// 11B, the S-box inverse is found by exhaustive search, the affine map uses
// byte rotations, and the cipher is coded round by round from the algorithm
// definition for any Nb, Nk in {4, 6, 8}.  Blocks are 32-byte arrays in the
// same byte order as the data interface (byte i = row i%4, column i/4).
// Known-answer vectors of the 128-bit block standard are included so the model
// itself is checked.
package rijndael_ref_pkg;

  typedef logic [31:0][7:0] blk_t;

  function automatic logic [7:0] ref_mul(input logic [7:0] a, input logic [7:0] b);
    logic [8:0] aa;
    logic [7:0] p;
    aa = {1'b0, a};
    p  = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa[7:0];
      aa = aa << 1;
      if (aa[8]) aa ^= 9'h11B;
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] v, input int n);
    return (v << n) | (v >> (8 - n));
  endfunction

  // S-box tables, filled on first use by exhaustive inverse search.
  logic [7:0] sb_tab  [256];
  logic [7:0] isb_tab [256];
  bit         tab_ok = 0;

  function automatic void build_tables();
    logic [7:0] inv, s;
    for (int a = 0; a < 256; a++) begin
      inv = 0;
      for (int y = 1; y < 256; y++)
        if (ref_mul(8'(a), 8'(y)) == 8'h01) inv = 8'(y);
      s = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
      sb_tab[a]  = s;
      isb_tab[s] = 8'(a);
    end
    tab_ok = 1;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    if (!tab_ok) build_tables();
    return sb_tab[a];
  endfunction

  function automatic logic [7:0] ref_inv_sbox(input logic [7:0] a);
    if (!tab_ok) build_tables();
    return isb_tab[a];
  endfunction

  function automatic int ref_nr(input int nb, input int nk);
    return ((nb > nk) ? nb : nk) + 6;
  endfunction

  function automatic int ref_shift(input int nb, input int r);
    if (r == 0) return 0;
    if (nb == 8) return (r == 1) ? 1 : (r == 2) ? 3 : 4;
    return r;
  endfunction

  // Expanded key words W[0..Nb*(Nr+1)-1]; word byte r in bits [8r +: 8].
  function automatic void ref_expand(input blk_t key, input int nb, input int nk,
                                     output logic [31:0] w [120]);
    int nr, total;
    logic [7:0] rc;
    logic [31:0] t;
    nr = ref_nr(nb, nk);
    total = nb * (nr + 1);
    rc = 8'h01;
    for (int i = 0; i < 120; i++) w[i] = 0;
    for (int i = 0; i < nk; i++)
      w[i] = {key[4*i+3], key[4*i+2], key[4*i+1], key[4*i]};
    for (int i = nk; i < total; i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[7:0], t[31:8]};
        for (int b = 0; b < 4; b++) t[8*b +: 8] = ref_sbox(t[8*b +: 8]);
        t[7:0] ^= rc;
        rc = ref_mul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        for (int b = 0; b < 4; b++) t[8*b +: 8] = ref_sbox(t[8*b +: 8]);
      end
      w[i] = w[i-nk] ^ t;
    end
  endfunction

  function automatic blk_t ref_round_key(input logic [31:0] w [120], input int nb, input int r);
    blk_t k;
    k = 0;
    for (int c = 0; c < nb; c++)
      for (int b = 0; b < 4; b++) k[4*c+b] = w[nb*r + c][8*b +: 8];
    return k;
  endfunction

  function automatic blk_t ref_shiftrow(input blk_t s, input int nb, input bit inverse);
    blk_t o;
    o = 0;
    for (int c = 0; c < nb; c++)
      for (int r = 0; r < 4; r++)
        if (!inverse) o[4*c+r] = s[4*((c + ref_shift(nb, r)) % nb) + r];
        else          o[4*((c + ref_shift(nb, r)) % nb) + r] = s[4*c+r];
    return o;
  endfunction

  function automatic blk_t ref_mixcol(input blk_t s, input int nb, input bit inverse);
    blk_t o;
    logic [7:0] m [4];
    o = 0;
    if (!inverse) m = '{8'h02, 8'h03, 8'h01, 8'h01};
    else          m = '{8'h0E, 8'h0B, 8'h0D, 8'h09};
    for (int c = 0; c < nb; c++)
      for (int r = 0; r < 4; r++)
        for (int j = 0; j < 4; j++)
          o[4*c+r] ^= ref_mul(m[(j - r + 4) % 4], s[4*c+j]);
    return o;
  endfunction

  function automatic blk_t ref_subbytes(input blk_t s, input int nb, input bit inverse);
    blk_t o;
    o = 0;
    for (int i = 0; i < 4*nb; i++) o[i] = inverse ? ref_inv_sbox(s[i]) : ref_sbox(s[i]);
    return o;
  endfunction

  function automatic blk_t ref_encrypt(input blk_t pt, input blk_t key, input int nb, input int nk);
    logic [31:0] w [120];
    blk_t s;
    int nr;
    nr = ref_nr(nb, nk);
    ref_expand(key, nb, nk, w);
    s = pt ^ ref_round_key(w, nb, 0);
    for (int r = 1; r <= nr; r++) begin
      s = ref_shiftrow(ref_subbytes(s, nb, 0), nb, 0);
      if (r != nr) s = ref_mixcol(s, nb, 0);
      s ^= ref_round_key(w, nb, r);
    end
    return s;
  endfunction

  function automatic blk_t ref_decrypt(input blk_t ct, input blk_t key, input int nb, input int nk);
    logic [31:0] w [120];
    blk_t s;
    int nr;
    nr = ref_nr(nb, nk);
    ref_expand(key, nb, nk, w);
    s = ct;
    for (int r = nr; r >= 1; r--) begin
      s ^= ref_round_key(w, nb, r);
      if (r != nr) s = ref_mixcol(s, nb, 1);
      s = ref_subbytes(ref_shiftrow(s, nb, 1), nb, 1);
    end
    return s ^ ref_round_key(w, nb, 0);
  endfunction

  // Big-endian hex string order (first byte leftmost) to block byte order.
  function automatic blk_t from_hex(input logic [255:0] h, input int nbytes);
    blk_t b;
    b = 0;
    for (int i = 0; i < nbytes; i++) b[i] = h[8*(nbytes-1-i) +: 8];
    return b;
  endfunction

  function automatic blk_t rand_blk(input int ncols);
    blk_t b;
    b = 0;
    for (int i = 0; i < 4*ncols; i++) b[i] = 8'($urandom);
    return b;
  endfunction

endpackage
