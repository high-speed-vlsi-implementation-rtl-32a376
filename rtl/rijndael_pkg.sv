// rijndael_pkg - types, constants and GF(2^8) arithmetic shared by the
// Rijndael processor.
//
// The state and every round key are held as 32 bytes (256 bits), the largest
// block Rijndael allows.  Byte i of a block is row (i % 4) of column (i / 4),
// i.e. the order in which the bytes arrive on the data interface, and it sits
// in bits [8*i +: 8] of the packed vector.  Columns at and above Nb are unused
// and carried as zero.
//
// The mode encoding (Table "operation modes") is the one of the design:
//   mode = 3 * key_code + data_code, code 0/1/2 = 128/192/256 bits.
// The round count Nr = max(Nk, Nb) + 6 reproduces the published round table.
// Codes 9..15 are not defined; this design treats them as mode 0.
//
// The GF(2^8) helpers follow the decomposition used in the design: constant
// multipliers are built from x, x^2 and x^3 products in which the modulo
// reduction is a single XOR level selected by the top bits of the operand.
// The S-box functions compute the multiplicative inverse as a^254 followed by
// the affine map; they are combinational logic, not a ROM.
package rijndael_pkg;

  typedef logic [7:0]        byte_t;
  typedef logic [31:0]       word_t;
  typedef logic [31:0][7:0]  state_t;   // 32 bytes, byte i = row i%4, column i/4

  localparam int unsigned MAX_NB     = 8;
  localparam int unsigned MAX_WORDS  = 120;  // Nb*(Nr+1) for Nb = 8, Nr = 14: 3840 bits

  // Decoded operating mode.
  typedef struct packed {
    logic [3:0] nb;   // block columns: 4, 6 or 8
    logic [3:0] nk;   // key columns:   4, 6 or 8
    logic [3:0] nr;   // rounds: 10, 12 or 14
  } mode_cfg_t;

  function automatic mode_cfg_t decode_mode(input logic [3:0] mode);
    mode_cfg_t   c;
    logic [1:0]  dcode, kcode;
    logic [3:0]  m;
    m     = (mode > 4'd8) ? 4'd0 : mode;
    dcode = 2'(m % 3);
    kcode = 2'(m / 3);
    c.nb  = 4'd4 + {1'b0, dcode, 1'b0};
    c.nk  = 4'd4 + {1'b0, kcode, 1'b0};
    c.nr  = ((c.nb > c.nk) ? c.nb : c.nk) + 4'd6;
    return c;
  endfunction

  // ShiftRow offsets for rows 1..3 (row 0 is never shifted).
  function automatic logic [3:0] row_offset(input logic [3:0] nb, input int unsigned row);
    case (row)
      1:       return 4'd1;
      2:       return (nb == 4'd8) ? 4'd3 : 4'd2;
      3:       return (nb == 4'd8) ? 4'd4 : 4'd3;
      default: return 4'd0;
    endcase
  endfunction

  // Multiplication by x, x^2 and x^3 modulo m(x) = x^8+x^4+x^3+x+1.
  // x^8 = 1B, x^9 = 36, x^10 = 6C: the bits shifted out of the top select
  // which of these reduction terms are added.
  function automatic byte_t mul_x(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic byte_t mul_x2(input byte_t a);
    return {a[5:0], 2'b00} ^ (a[7] ? 8'h36 : 8'h00) ^ (a[6] ? 8'h1B : 8'h00);
  endfunction

  function automatic byte_t mul_x3(input byte_t a);
    return {a[4:0], 3'b000} ^ (a[7] ? 8'h6C : 8'h00) ^ (a[6] ? 8'h36 : 8'h00)
         ^ (a[5] ? 8'h1B : 8'h00);
  endfunction

  // Inverse MixColumn coefficients (hex 09, 0B, 0D, 0E).
  function automatic byte_t mul_09(input byte_t a); return mul_x3(a) ^ a;                      endfunction
  function automatic byte_t mul_0b(input byte_t a); return mul_x3(a) ^ mul_x(a) ^ a;           endfunction
  function automatic byte_t mul_0d(input byte_t a); return mul_x3(a) ^ mul_x2(a) ^ a;          endfunction
  function automatic byte_t mul_0e(input byte_t a); return mul_x3(a) ^ mul_x2(a) ^ mul_x(a);    endfunction

  // General GF(2^8) product, used by the inversion below.
  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p, s;
    p = 8'h00;
    s = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ s;
      s = mul_x(s);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (a^2 * a^4 * ... * a^128); 00 maps to 00.
  function automatic byte_t gf_inv(input byte_t a);
    byte_t sq, acc;
    sq  = gf_mul(a, a);
    acc = sq;
    for (int i = 0; i < 6; i++) begin
      sq  = gf_mul(sq, sq);
      acc = gf_mul(acc, sq);
    end
    return acc;
  endfunction

  // Affine map of ByteSub: Y_i = X_i ^ X_(i+4) ^ X_(i+5) ^ X_(i+6) ^ X_(i+7) ^ c_i,
  // indices mod 8, c = 63.
  function automatic byte_t affine(input byte_t x);
    byte_t y;
    for (int i = 0; i < 8; i++)
      y[i] = x[i] ^ x[(i + 4) % 8] ^ x[(i + 5) % 8] ^ x[(i + 6) % 8] ^ x[(i + 7) % 8];
    return y ^ 8'h63;
  endfunction

  // Inverse affine map: X_i = Y_(i+2) ^ Y_(i+5) ^ Y_(i+7) ^ d_i, d = 05.
  function automatic byte_t inv_affine(input byte_t y);
    byte_t x;
    for (int i = 0; i < 8; i++)
      x[i] = y[(i + 2) % 8] ^ y[(i + 5) % 8] ^ y[(i + 7) % 8];
    return x ^ 8'h05;
  endfunction

  function automatic byte_t sbox_f(input byte_t a);
    return affine(gf_inv(a));
  endfunction

  function automatic byte_t inv_sbox_f(input byte_t a);
    return gf_inv(inv_affine(a));
  endfunction

  // Clears the bytes of columns at and above nb.
  function automatic state_t mask_cols(input state_t s, input logic [3:0] nb);
    state_t r;
    for (int i = 0; i < 32; i++)
      r[i] = ((i / 4) < int'(nb)) ? s[i] : 8'h00;
    return r;
  endfunction

endpackage
