// aes_enc_core -- AES-128 encryption core with an 8-bit datapath.
//
// Two register banks hold the data: the State-Register (the block, with
// ShiftRows built in) and the Key-Register (the current round key, expanded
// on the fly). Between them runs a byte-wide datapath: one shared S-box, one
// 8-bit MixColumns unit and the AddRoundKey XOR. A controller walks the
// registers through byte passes; every register bank and the round-constant
// register has its own clock gate, and the controller opens a gate only in
// the cycles where that bank changes.
//
// Schedule after start (cycle counts in brackets):
//   LOAD  [1]  block -> State-Register, key -> Key-Register, rcon = 01
//   for round r = 1..10:
//     SB  [16] s <= SubBytes(s), one byte per cycle; in round 1 the
//              initial AddRoundKey is applied on the way in,
//              s <= SubBytes(s ^ K(0)), with the Key-Register rotating to
//              supply K(0) byte by byte
//     SR  [1]  ShiftRows inside the State-Register
//     KE  [16] Key-Register computes K(r) using the shared S-box; State-
//              Register and MixColumns clocks are off
//     MC  [20] rounds 1..9 only: s streams through MixColumns and the
//              mixed bytes go straight through AddRoundKey with K(r) back
//              into the register (four cycles of MixColumns latency, hence
//              20 shifts)
//   ARK   [16] round 10: s <= s ^ K(10)
// done pulses in the cycle after the last pass, 527 cycles after start,
// with dout valid from then until the next start. The 8-bit datapath,
// shared S-box, ShiftRows in the register, 8-bit MixColumns feeding
// AddRoundKey byte by byte, clock gating
// and gated state/MixColumns clocks during key expansion follow the published design;
// the pass schedule and cycle counts are this design's own.
//
// Interface: clk, rst_n (async, active low), start (one-cycle request, taken
// when not busy), key, din (plaintext), dout (ciphertext), busy, done.
module aes_enc_core
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
    P_IDLE, P_SB, P_SR, P_KE, P_MC, P_ARK
  } phase_e;

  phase_e     phase;
  logic [4:0] cnt;
  logic [3:0] round;

  // datapath signals
  st_op_e     st_op;
  key_op_e    key_op;
  rc_op_e     rc_op;
  logic       st_en, key_en, rc_en, mc_en;
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

  aes_mixcol8 #(.INVERSE(1'b0)) u_mc (
    .clk, .rst_n, .en(mc_en), .last(cnt[1:0] == 2'd3), .din(st_out),
    .dout(mc_out)
  );

  aes_sbox u_sbox (.inv(1'b0), .din(sb_in), .dout(sb_out));

  logic go;
  assign go = (phase == P_IDLE) && start;

  always_comb begin
    st_en  = 1'b0; st_op  = ST_SHIFT; st_in = 8'h00;
    key_en = 1'b0; key_op = KEY_ROT;
    rc_en  = 1'b0; rc_op  = RC_NEXT;
    mc_en  = 1'b0;
    sb_in  = st_out ^ k_out;
    unique case (phase)
      P_IDLE: if (start) begin
        st_en = 1'b1;  st_op  = ST_LOAD;
        key_en = 1'b1; key_op = KEY_LOAD;
        rc_en = 1'b1;  rc_op  = RC_LOAD;
      end
      P_SB: begin
        // AddRoundKey with K(0) is folded into the first SubBytes pass
        st_en = 1'b1;  st_in = sb_out;
        if (round != 4'd1) sb_in = st_out;
        key_en = (round == 4'd1); key_op = KEY_ROT;
      end
      P_SR: begin
        st_en = 1'b1; st_op = ST_SR;
      end
      P_KE: begin
        key_en = 1'b1; key_op = KEY_EXP;
        sb_in  = key_sb_in;
        rc_en  = (cnt == 5'd15);
      end
      P_MC: begin
        // MixColumns output goes byte by byte through AddRoundKey; the
        // first four cycles only fill the MixColumns registers, so the
        // key starts rotating when the first mixed byte appears.
        st_en = 1'b1; st_in = mc_out ^ k_out;
        mc_en = 1'b1;
        key_en = (cnt >= 5'd4); key_op = KEY_ROT;
      end
      P_ARK: begin
        st_en = 1'b1;  st_in = st_out ^ k_out;
        key_en = 1'b1; key_op = KEY_ROT;
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
          if (go) begin
            phase <= P_SB;
            round <= 4'd1;
          end
        end
        P_SB: if (cnt == 5'd15) begin
          phase <= P_SR; cnt <= '0;
        end
        P_SR: begin
          phase <= P_KE; cnt <= '0;
        end
        P_KE: if (cnt == 5'd15) begin
          phase <= (round == 4'(NR)) ? P_ARK : P_MC;
          cnt   <= '0;
        end
        P_MC: if (cnt == 5'd19) begin
          phase <= P_SB; cnt <= '0;
          round <= round + 4'd1;
        end
        P_ARK: if (cnt == 5'd15) begin
          phase <= P_IDLE; cnt <= '0;
          done  <= 1'b1;
        end
        default: phase <= P_IDLE;
      endcase
    end
  end

  assign busy = (phase != P_IDLE);
  assign dout = state;

  // done is only raised once the controller is back in idle, so dout is
  // stable while it is read.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                done |-> (phase == P_IDLE));
endmodule
