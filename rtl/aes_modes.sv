// aes_modes -- block-cipher modes of operation around the AES cores.
//
// Turns the two AES-128 cores into a stream cipher unit for ECB, CBC, CFB
// (full 128-bit segments), OFB and CTR. Around the cores sit an XOR on the
// input side, an XOR on the output side, a choice between the input block
// and a feedback value as core input, and a chaining register per direction
// that starts at the IV and then holds the previous ciphertext (CBC, CFB),
// the previous keystream block (OFB) or the counter (CTR):
//   mode  encrypt                       decrypt
//   ECB   C = E(P)                      P = D(C)
//   CBC   C = E(P ^ F),  F <= C         P = D(C) ^ F,  F <= C
//   CFB   C = P ^ E(F),  F <= C         P = C ^ E(F),  F <= C
//   OFB   O = E(F), C = P ^ O, F <= O   same with P and C swapped
//   CTR   C = P ^ E(F),  F <= F + 1     same with P and C swapped
// CFB, OFB and CTR use the encryption core in both directions, so only ECB
// and CBC decryption run the decryption core. The encrypt and decrypt
// directions keep separate chaining registers, so a stream can be encrypted
// and the result decrypted block by block. The list of modes and the
// XOR-before/XOR-after structure with IV muxes come from the published mode
// diagrams; the mode definitions are the standard ones and the encoding,
// the separate chaining registers and the handshake are this design's.
//
// Interface: clk, rst_n (async, active low), mode (mode_e, sampled at
// start), key, iv, init (load iv into both chaining registers; ignored
// while busy), start + decrypt + din (one block request, taken when not
// busy), dout (registered result), busy, done (one-cycle pulse with dout
// valid; dout holds until the next done). Latency is the core's (527 cycles
// through the encryption core, 687 through the decryption core) plus one.
module aes_modes
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  mode_e        mode,
  input  logic [127:0] key,
  input  logic [127:0] iv,
  input  logic         init,
  input  logic         start,
  input  logic         decrypt,
  input  logic [127:0] din,
  output logic [127:0] dout,
  output logic         busy,
  output logic         done
);
  logic [127:0] fb_enc, fb_dec, din_q;
  mode_e        mode_q;
  logic         dec_q, use_dec_q, run;

  logic         use_dec;
  logic [127:0] core_in, enc_out, dec_out, core_out, result;
  logic         enc_start, dec_start, enc_busy, dec_busy, enc_done, dec_done;

  // Core selection and input side of the mode structure.
  always_comb begin
    use_dec = decrypt && (mode == MODE_ECB || mode == MODE_CBC);
    unique case (mode)
      MODE_ECB: core_in = din;
      MODE_CBC: core_in = decrypt ? din : (din ^ fb_enc);
      default:  core_in = decrypt ? fb_dec : fb_enc;
    endcase
  end

  assign enc_start = start && !run && !use_dec;
  assign dec_start = start && !run &&  use_dec;

  aes_enc_core u_enc (
    .clk, .rst_n, .start(enc_start), .key(key), .din(core_in),
    .dout(enc_out), .busy(enc_busy), .done(enc_done)
  );

  aes_dec_core u_dec (
    .clk, .rst_n, .start(dec_start), .key(key), .din(core_in),
    .dout(dec_out), .busy(dec_busy), .done(dec_done)
  );

  // Output side of the mode structure.
  always_comb begin
    core_out = use_dec_q ? dec_out : enc_out;
    unique case (mode_q)
      MODE_ECB: result = core_out;
      MODE_CBC: result = dec_q ? (core_out ^ fb_dec) : core_out;
      default:  result = din_q ^ core_out;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_enc    <= '0;
      fb_dec    <= '0;
      din_q     <= '0;
      mode_q    <= MODE_ECB;
      dec_q     <= 1'b0;
      use_dec_q <= 1'b0;
      run       <= 1'b0;
      dout      <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (init) begin
          fb_enc <= iv;
          fb_dec <= iv;
        end
        if (start) begin
          run       <= 1'b1;
          din_q     <= din;
          mode_q    <= mode;
          dec_q     <= decrypt;
          use_dec_q <= use_dec;
        end
      end else if (enc_done || dec_done) begin
        run  <= 1'b0;
        done <= 1'b1;
        dout <= result;
        if (!dec_q) begin
          unique case (mode_q)
            MODE_CBC, MODE_CFB: fb_enc <= result;
            MODE_OFB:           fb_enc <= core_out;
            MODE_CTR:           fb_enc <= fb_enc + 128'd1;
            default: ;
          endcase
        end else begin
          unique case (mode_q)
            MODE_CBC, MODE_CFB: fb_dec <= din_q;
            MODE_OFB:           fb_dec <= core_out;
            MODE_CTR:           fb_dec <= fb_dec + 128'd1;
            default: ;
          endcase
        end
      end
    end
  end

  assign busy = run;

  // The core that was started is the one that finishes.
  a_core_match: assert property (@(posedge clk) disable iff (!rst_n)
                                 (enc_done |-> !use_dec_q) and (dec_done |-> use_dec_q));
  a_one_core: assert property (@(posedge clk) disable iff (!rst_n)
                               !(enc_busy && dec_busy));
endmodule
