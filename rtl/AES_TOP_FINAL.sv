// AES_TOP_FINAL -- AES-128 crypto processor, encrypt-and-verify top.
//
// A host loads a key (kld) and then hands in 128-bit blocks (en). Each
// block is encrypted under the selected mode of operation, the ciphertext
// is presented on enc_data, and the same ciphertext is then decrypted
// again and presented on dec_data, which must equal text_in. The work is
// done by aes_modes, which holds the byte-serial encryption and decryption
// cores and the chaining registers of the modes.
//
// Sequence: kld=1 for one cycle captures key and iv and restarts chaining;
// en=1 for one cycle (while idle) captures text_in and clears both complete
// flags. enc_complete is seen high 529 cycles after the en cycle (counting
// that cycle as 1). dec_complete follows 688 cycles later for ECB and CBC,
// which use the decryption core, or 528 cycles later for CFB, OFB and CTR,
// which reuse the encryption core. Both flags stay high until the next en or kld. en and kld are ignored while a block
// is in flight.
// The port names clk, rst, en, kld, key, text_in, enc_data, dec_data,
// enc_complete and dec_complete are the processor's published interface;
// the meaning given to en and kld, the encrypt-then-decrypt sequencing and
// the extra mode and iv ports are this design's own reading. rst is
// asynchronous and active high.
module AES_TOP_FINAL
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         kld,
  input  logic [127:0] key,
  input  logic [127:0] text_in,
  input  logic [2:0]   mode,
  input  logic [127:0] iv,
  output logic [127:0] enc_data,
  output logic [127:0] dec_data,
  output logic         enc_complete,
  output logic         dec_complete
);
  typedef enum logic [1:0] {T_IDLE, T_ENC, T_DEC} top_state_e;

  top_state_e   st;
  logic         rst_n;
  logic [127:0] key_q;
  mode_e        mode_q;
  logic         m_init, m_start, m_dec, m_busy, m_done;
  logic [127:0] m_din, m_dout;

  assign rst_n = !rst;

  aes_modes u_modes (
    .clk, .rst_n, .mode(mode_q), .key(key_q), .iv(iv), .init(m_init),
    .start(m_start), .decrypt(m_dec), .din(m_din), .dout(m_dout),
    .busy(m_busy), .done(m_done)
  );

  always_comb begin
    m_init  = (st == T_IDLE) && kld;
    m_start = 1'b0;
    m_dec   = 1'b0;
    m_din   = text_in;
    if (st == T_IDLE && en && !kld) m_start = 1'b1;
    if (st == T_ENC && m_done) begin
      m_start = 1'b1;
      m_dec   = 1'b1;
      m_din   = m_dout;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= T_IDLE;
      key_q        <= '0;
      mode_q       <= MODE_ECB;
      enc_data     <= '0;
      dec_data     <= '0;
      enc_complete <= 1'b0;
      dec_complete <= 1'b0;
    end else begin
      unique case (st)
        T_IDLE: begin
          if (kld) begin
            key_q        <= key;
            mode_q       <= mode_e'(mode);
            enc_complete <= 1'b0;
            dec_complete <= 1'b0;
          end else if (en) begin
            st           <= T_ENC;
            enc_complete <= 1'b0;
            dec_complete <= 1'b0;
          end
        end
        T_ENC: if (m_done) begin
          enc_data     <= m_dout;
          enc_complete <= 1'b1;
          st           <= T_DEC;
        end
        T_DEC: if (m_done) begin
          dec_data     <= m_dout;
          dec_complete <= 1'b1;
          st           <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  // A new request is only accepted by the mode unit when it is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 m_start |-> !m_busy);
endmodule
