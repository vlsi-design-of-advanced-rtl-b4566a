// aes_ref_pkg -- behavioural AES-128 reference for the testbenches.
//
// A plain, word-at-a-time model of FIPS-197 written independently of the
// RTL: the S-box inverse is found by searching for y with x*y = 1 instead of
// exponentiation, the round keys are expanded into a table of eleven keys,
// and whole 128-bit blocks are transformed at once. It also gives the five
// modes of operation on a single block with an explicit chaining value.
package aes_ref_pkg;

  function automatic logic [7:0] r_mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= (16'h11b << (i - 8));
    return p[7:0];
  endfunction

  function automatic logic [7:0] r_sbox(input logic [7:0] x);
    logic [7:0] inv, s;
    logic [7:0] c;
    c   = 8'h63;
    inv = 8'h00;
    for (int y = 1; y < 256; y++) if (r_mul(x, 8'(y)) == 8'h01) inv = 8'(y);
    // affine map bit by bit: s_i = b_i ^ b_{i+4} ^ b_{i+5} ^ b_{i+6} ^ b_{i+7} ^ c_i
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^
             inv[(i + 7) % 8] ^ c[i];
    return s;
  endfunction

  function automatic logic [7:0] r_inv_sbox(input logic [7:0] y);
    for (int x = 0; x < 256; x++) if (r_sbox(8'(x)) == y) return 8'(x);
    return 8'h00;
  endfunction

  // Byte i of a block (i = 0 is the most significant byte).
  function automatic logic [7:0] gb(input logic [127:0] b, input int i);
    return b[127 - 8*i -: 8];
  endfunction

  function automatic logic [127:0] r_sub_bytes(input logic [127:0] b, input bit inv);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = inv ? r_inv_sbox(gb(b, i)) : r_sbox(gb(b, i));
    return o;
  endfunction

  function automatic logic [127:0] r_shift_rows(input logic [127:0] b, input bit inv);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) o[127 - 8*(r + 4*c) -: 8] = gb(b, r + 4*((c + r) % 4));
        else      o[127 - 8*(r + 4*((c + r) % 4)) -: 8] = gb(b, r + 4*c);
    return o;
  endfunction

  function automatic logic [31:0] r_mix_word(input logic [31:0] w, input bit inv);
    logic [7:0] a [4];
    logic [7:0] m [4];
    logic [31:0] o;
    m = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int i = 0; i < 4; i++) a[i] = w[31 - 8*i -: 8];
    for (int i = 0; i < 4; i++)
      o[31 - 8*i -: 8] = r_mul(m[0], a[i]) ^ r_mul(m[1], a[(i+1)%4]) ^
                         r_mul(m[2], a[(i+2)%4]) ^ r_mul(m[3], a[(i+3)%4]);
    return o;
  endfunction

  function automatic logic [127:0] r_mix_columns(input logic [127:0] b, input bit inv);
    logic [127:0] o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = r_mix_word(b[127 - 32*c -: 32], inv);
    return o;
  endfunction

  typedef logic [127:0] rk_t [11];

  function automatic rk_t r_expand(input logic [127:0] key);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    rk_t rk;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {r_sbox(t[31:24]), r_sbox(t[23:16]), r_sbox(t[15:8]), r_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = r_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] r_encrypt(input logic [127:0] key, input logic [127:0] pt);
    rk_t rk;
    logic [127:0] s;
    rk = r_expand(key);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = r_shift_rows(r_sub_bytes(s, 0), 0);
      if (r != 10) s = r_mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic logic [127:0] r_decrypt(input logic [127:0] key, input logic [127:0] ct);
    rk_t rk;
    logic [127:0] s;
    rk = r_expand(key);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = r_sub_bytes(r_shift_rows(s, 1), 1) ^ rk[r];
      if (r != 0) s = r_mix_columns(s, 1);
    end
    return s;
  endfunction

  // One block of a mode of operation (0 ECB, 1 CBC, 2 CFB, 3 OFB, 4 CTR);
  // fb is the chaining value and is updated.
  function automatic logic [127:0] r_mode(input int mode, input bit dec, input logic [127:0] key,
                                          input logic [127:0] x, inout logic [127:0] fb);
    logic [127:0] y, ks;
    case (mode)
      0: y = dec ? r_decrypt(key, x) : r_encrypt(key, x);
      1: if (!dec) begin y = r_encrypt(key, x ^ fb); fb = y; end
         else      begin y = r_decrypt(key, x) ^ fb; fb = x; end
      2: begin y = x ^ r_encrypt(key, fb); fb = dec ? x : y; end
      3: begin ks = r_encrypt(key, fb); y = x ^ ks; fb = ks; end
      default: begin y = x ^ r_encrypt(key, fb); fb = fb + 128'd1; end
    endcase
    return y;
  endfunction

endpackage
