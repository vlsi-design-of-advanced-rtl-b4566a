// aes_sbox -- combined SubBytes / InvSubBytes unit.
//
// One S-box serves the whole processor: the encryption rounds, the key
// expansion and, with inv=1, the decryption rounds. Forward and inverse
// S-boxes share their costly part, the multiplicative inverse in GF(2^8):
//   SubBytes(x)    = affine(inverse(x))
//   InvSubBytes(x) = inverse(inv_affine(x))
// so only the two cheap affine maps are duplicated and selected by muxes.
// The inverse is computed as x^254. Sharing one unit between forward and
// inverse, and between rounds and key schedule, follows the published design; the exact
// inner structure is this design's own.
//
// Interface: purely combinational, inv selects the direction, din -> dout.
module aes_sbox
  import aes_pkg::*;
(
  input  logic       inv,
  input  logic [7:0] din,
  output logic [7:0] dout
);
  logic [7:0] pre, post;

  always_comb begin
    pre  = inv ? inv_affine(din) : din;
    post = gf_inv(pre);
    dout = inv ? post : affine(post);
  end
endmodule
