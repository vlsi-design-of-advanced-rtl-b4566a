// aes_pkg -- types and GF(2^8) arithmetic shared by the byte-serial AES-128
// processor.
//
// The processor works on the FIPS-197 state: a 128-bit block is 16 bytes,
// byte i = bits [127-8i -: 8], placed at row i%4, column i/4. All units in
// the datapath are 8 bits wide; the functions here are the byte-level
// arithmetic they share: multiplication by x (xtime), general GF(2^8)
// multiplication modulo x^8+x^4+x^3+x+1, the multiplicative inverse
// (computed as x^254) and the forward/inverse affine maps of the S-box.
// The enums name the operations of the register banks; their encodings are
// this design's own.
package aes_pkg;

  // Rounds of AES-128.
  localparam int unsigned NR = 10;

  // Block-cipher modes of operation.
  typedef enum logic [2:0] {
    MODE_ECB = 3'd0,
    MODE_CBC = 3'd1,
    MODE_CFB = 3'd2,
    MODE_OFB = 3'd3,
    MODE_CTR = 3'd4
  } mode_e;

  // State-Register operations.
  typedef enum logic [1:0] {
    ST_LOAD  = 2'd0,  // parallel load of a 128-bit block
    ST_SHIFT = 2'd1,  // byte shift: position 0 out, din into position 15
    ST_SR    = 2'd2,  // ShiftRows permutation in place
    ST_ISR   = 2'd3   // InvShiftRows permutation in place
  } st_op_e;

  // Key-Register operations.
  typedef enum logic [1:0] {
    KEY_LOAD = 2'd0,  // parallel load of the cipher key
    KEY_ROT  = 2'd1,  // rotate one byte (feeds AddRoundKey)
    KEY_EXP  = 2'd2,  // one byte step of the forward key expansion
    KEY_IEXP = 2'd3   // one byte step of the inverse key expansion
  } key_op_e;

  // Round-constant register operations.
  typedef enum logic [1:0] {
    RC_LOAD = 2'd0,   // rcon = 01
    RC_NEXT = 2'd1,   // rcon = rcon * x
    RC_PREV = 2'd2    // rcon = rcon / x
  } rc_op_e;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Inverse of xtime: division by x modulo the AES polynomial.
  function automatic logic [7:0] xdiv(input logic [7:0] a);
    return a[0] ? (((a ^ 8'h1b) >> 1) | 8'h80) : (a >> 1);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, aa;
    p  = 8'h00;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0).
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] a2, a4, a8, a16, a32, a64, a128;
    a2   = gmul(a, a);
    a4   = gmul(a2, a2);
    a8   = gmul(a4, a4);
    a16  = gmul(a8, a8);
    a32  = gmul(a16, a16);
    a64  = gmul(a32, a32);
    a128 = gmul(a64, a64);
    // 254 = 128+64+32+16+8+4+2
    return gmul(gmul(gmul(a128, a64), gmul(a32, a16)), gmul(gmul(a8, a4), a2));
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] a, input int unsigned n);
    return (a << n) | (a >> (8 - n));
  endfunction

  // S-box affine map: b ^ rotl(b,1..4) ^ 63.
  function automatic logic [7:0] affine(input logic [7:0] b);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // Inverse affine map: rotl(b,1) ^ rotl(b,3) ^ rotl(b,6) ^ 05.
  function automatic logic [7:0] inv_affine(input logic [7:0] b);
    return rotl8(b, 1) ^ rotl8(b, 3) ^ rotl8(b, 6) ^ 8'h05;
  endfunction

endpackage
