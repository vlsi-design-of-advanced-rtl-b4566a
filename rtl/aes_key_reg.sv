// aes_key_reg -- the 16-byte Key-Register with byte-serial key expansion.
//
// Holds one AES-128 round key as bytes k[0..15] (FIPS-197 order, words
// w0..w3 = k[0..3]..k[12..15]). The datapath around it is one byte wide and
// the S-box it needs is the processor's shared one (sbox_in / sbox_out).
//
// KEY_ROT  rotates by one byte (k[i] <= k[i+1], k[15] <= k[0]): sixteen
//          rotations stream the round key on kout, byte 0 first, for
//          AddRoundKey and leave the register as it was.
// KEY_EXP  is one byte step of the forward expansion; sixteen steps with
//          step = 0..15 turn round key i into round key i+1. At step j the
//          old byte k_j is at position 0 and the new byte enters position 15:
//            j < 4 : k'_j = k_j ^ S(RotWord(w3))_j ^ (j==0 ? rcon : 0)
//            j >= 4: k'_j = k_j ^ k'_{j-4}           (k'_{j-4} sits at 12)
//          S-box inputs k13, k14, k15 are at position 13 for j = 0..2 and
//          k12 at position 9 for j = 3.
// KEY_IEXP is one byte step of the inverse expansion (round key i+1 to i),
//          shifting the other way (k[i] <= k[i-1], new byte into k[0]) and
//          working from byte 15 down to byte 0; step t handles j = 15-t:
//            j >= 4: k_j = k'_j ^ k'_{j-4}             (k'_j at 15, k'_{j-4} at 11)
//            j < 4 : k_j = k'_j ^ S(RotWord(w3))_j ^ (j==0 ? rcon : 0)
//          where the new w3 bytes are at position 12 for j = 2..0 and at 8
//          for j = 3.
// Sharing the S-box and keeping the Key-Register datapath 8 bits wide follow
// the published design; the byte ordering and the inverse expansion are this design's.
//
// Interface: clk, rst_n (async, active low), en (clock-gate enable), op
// (key_op_e), step (byte step 0..15), load_key, rcon, sbox_out, sbox_in,
// kout (= k[0]), key (whole register). sbox_in, kout and the next-byte logic
// are combinational; the register changes on enabled clock edges.
module aes_key_reg
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  key_op_e      op,
  input  logic [3:0]   step,
  input  logic [127:0] load_key,
  input  logic [7:0]   rcon,
  input  logic [7:0]   sbox_out,
  output logic [7:0]   sbox_in,
  output logic [7:0]   kout,
  output logic [127:0] key
);
  logic       gclk;
  logic [7:0] k [16];
  logic [7:0] fwd_new, inv_new;
  logic [3:0] j_inv;

  aes_clock_gate u_cg (.clk(clk), .en(en), .gclk(gclk));

  always_comb begin
    j_inv = 4'd15 - step;
    if (op == KEY_IEXP) sbox_in = (j_inv == 4'd3) ? k[8] : k[12];
    else                sbox_in = (step == 4'd3) ? k[9] : k[13];

    if (step < 4'd4) fwd_new = k[0] ^ sbox_out ^ ((step == 4'd0) ? rcon : 8'h00);
    else             fwd_new = k[0] ^ k[12];

    if (j_inv >= 4'd4) inv_new = k[15] ^ k[11];
    else               inv_new = k[15] ^ sbox_out ^ ((j_inv == 4'd0) ? rcon : 8'h00);
  end

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) k[i] <= 8'h00;
    end else begin
      unique case (op)
        KEY_LOAD: for (int i = 0; i < 16; i++) k[i] <= load_key[127 - 8*i -: 8];
        KEY_ROT: begin
          for (int i = 0; i < 15; i++) k[i] <= k[i + 1];
          k[15] <= k[0];
        end
        KEY_EXP: begin
          for (int i = 0; i < 15; i++) k[i] <= k[i + 1];
          k[15] <= fwd_new;
        end
        default: begin  // KEY_IEXP
          for (int i = 15; i > 0; i--) k[i] <= k[i - 1];
          k[0] <= inv_new;
        end
      endcase
    end
  end

  assign kout = k[0];

  always_comb begin
    for (int i = 0; i < 16; i++) key[127 - 8*i -: 8] = k[i];
  end
endmodule
