// aes_dec_core -- AES-128 decryption core with an 8-bit datapath.
//
// The mirror of aes_enc_core: the same State-Register (now using its
// InvShiftRows permutation), Key-Register, round-constant register and
// byte-wide datapath, with the shared S-box switched to InvSubBytes for the
// state and kept forward for the key schedule, and an 8-bit InvMixColumns
// unit. Decryption needs the round keys last-first, so the Key-Register
// first runs the forward expansion ten times to reach K(10) and then steps
// back one round key at a time with the inverse expansion.
//
// Schedule after start (cycle counts in brackets):
//   LOAD  [1]   ciphertext, key, rcon = 01
//   KF    [160] ten forward expansions, K(0) -> K(10); rcon ends at 6c
//   ARK   [16]  s <= s ^ K(10)
//   for r = 9 down to 0:
//     ISR [1]   InvShiftRows in the register; rcon steps back
//     IKE [16]  Key-Register K(r+1) -> K(r); state clocks off
//     ISB [16]  s <= InvSubBytes(s) ^ K(r), one byte per cycle
//     IMC [20]  r >= 1 only: s streams through InvMixColumns
// done pulses in the cycle after the last pass, 687 cycles after start.
// The round order (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns)
// follows the standard inverse cipher; the 8-bit structure copies the
// encryption architecture, and the schedule is this design's own.
//
// Interface: clk, rst_n (async, active low), start (one-cycle request, taken
// when not busy), key (cipher key, not the last round key), din
// (ciphertext), dout (plaintext), busy, done.
module aes_dec_core
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [127:0] key,
  input  logic [127:0] din,
  output logic [127:0] dout,
  output logic         busy,
  output logic         done
);
  typedef enum logic [2:0] {
    P_IDLE, P_KF, P_ARK, P_ISR, P_IKE, P_ISB, P_IMC
  } phase_e;

  phase_e     phase;
  logic [4:0] cnt;
  logic [3:0] round;

  st_op_e     st_op;
  key_op_e    key_op;
  rc_op_e     rc_op;
  logic       st_en, key_en, rc_en, mc_en, sb_inv;
  logic [7:0] st_out, st_in, k_out, mc_out, sb_in, sb_out, key_sb_in, rcon;
  logic [127:0] state;

  aes_state_reg u_state (
    .clk, .rst_n, .en(st_en), .op(st_op), .load_data(din),
    .din(st_in), .dout(st_out), .state(state)
  );

  aes_key_reg u_key (
    .clk, .rst_n, .en(key_en), .op(key_op), .step(cnt[3:0]),
    .load_key(key), .rcon(rcon), .sbox_out(sb_out), .sbox_in(key_sb_in),
    .kout(k_out), .key()
  );

  aes_rcon u_rcon (.clk, .rst_n, .en(rc_en), .op(rc_op), .rcon(rcon));

  aes_mixcol8 #(.INVERSE(1'b1)) u_mc (
    .clk, .rst_n, .en(mc_en), .last(cnt[1:0] == 2'd3), .din(st_out),
    .dout(mc_out)
  );

  aes_sbox u_sbox (.inv(sb_inv), .din(sb_in), .dout(sb_out));

  always_comb begin
    st_en  = 1'b0; st_op  = ST_SHIFT; st_in = 8'h00;
    key_en = 1'b0; key_op = KEY_ROT;
    rc_en  = 1'b0; rc_op  = RC_NEXT;
    mc_en  = 1'b0;
    sb_in  = key_sb_in;
    sb_inv = 1'b0;
    unique case (phase)
      P_IDLE: if (start) begin
        st_en = 1'b1;  st_op  = ST_LOAD;
        key_en = 1'b1; key_op = KEY_LOAD;
        rc_en = 1'b1;  rc_op  = RC_LOAD;
      end
      P_KF: begin
        key_en = 1'b1; key_op = KEY_EXP;
        rc_en  = (cnt[3:0] == 4'd15);
      end
      P_ARK: begin
        st_en = 1'b1;  st_in = st_out ^ k_out;
        key_en = 1'b1; key_op = KEY_ROT;
      end
      P_ISR: begin
        st_en = 1'b1; st_op = ST_ISR;
        rc_en = 1'b1; rc_op = RC_PREV;
      end
      P_IKE: begin
        key_en = 1'b1; key_op = KEY_IEXP;
      end
      P_ISB: begin
        sb_in  = st_out;
        sb_inv = 1'b1;
        st_en  = 1'b1; st_in = sb_out ^ k_out;
        key_en = 1'b1; key_op = KEY_ROT;
      end
      P_IMC: begin
        st_en = 1'b1; st_in = mc_out;
        mc_en = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= P_IDLE;
      cnt   <= '0;
      round <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      cnt  <= cnt + 5'd1;
      unique case (phase)
        P_IDLE: begin
          cnt <= '0;
          if (start) begin
            phase <= P_KF;
            round <= 4'd0;
          end
        end
        P_KF: if (cnt[3:0] == 4'd15) begin
          cnt <= '0;
          if (round == 4'(NR - 1)) begin
            phase <= P_ARK;
            round <= 4'(NR - 1);
          end else begin
            round <= round + 4'd1;
          end
        end
        P_ARK: if (cnt == 5'd15) begin
          phase <= P_ISR; cnt <= '0;
        end
        P_ISR: begin
          phase <= P_IKE; cnt <= '0;
        end
        P_IKE: if (cnt == 5'd15) begin
          phase <= P_ISB; cnt <= '0;
        end
        P_ISB: if (cnt == 5'd15) begin
          cnt <= '0;
          if (round == 4'd0) begin
            phase <= P_IDLE;
            done  <= 1'b1;
          end else begin
            phase <= P_IMC;
          end
        end
        P_IMC: if (cnt == 5'd19) begin
          phase <= P_ISR; cnt <= '0;
          round <= round - 4'd1;
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  assign busy = (phase != P_IDLE);
  assign dout = state;

  // done is only raised once the controller is back in idle.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                done |-> (phase == P_IDLE));
endmodule
