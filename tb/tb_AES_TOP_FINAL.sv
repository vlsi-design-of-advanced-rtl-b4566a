// tb_AES_TOP_FINAL -- end-to-end test of the crypto processor at its
// default (and only) configuration.
// For every mode of operation a key is loaded with kld and a stream of
// blocks is sent with en: the ASCII text "AES Project" first, then random
// blocks. Each enc_data is compared with the reference model (which carries
// its own chaining value) and each dec_data with the block sent; the cycle
// counts from en to enc_complete and to dec_complete are checked. One en
// pulse is given while a block is in flight and must be ignored. The test
// also counts how often the processor's mechanisms were exercised and fails
// any that never happened: each mode, chaining over several blocks, re-keying,
// key expansion with the State-Register and MixColumns clocks gated off, the
// shared S-box serving the key schedule, ShiftRows and InvShiftRows inside
// the State-Register, the byte-serial MixColumns and InvMixColumns, and the
// inverse key schedule of the decryption core.
module tb_AES_TOP_FINAL;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst = 0, en = 0, kld = 0;
  logic [127:0] key = '0, text_in = '0, iv = '0;
  logic [2:0] mode = '0;
  logic [127:0] enc_data, dec_data;
  logic enc_complete, dec_complete;
  int checks = 0, failures = 0;

  AES_TOP_FINAL dut (.clk, .rst, .en, .kld, .key, .text_in, .mode, .iv,
                     .enc_data, .dec_data, .enc_complete, .dec_complete);

  always #5 clk = ~clk;

  // mechanism counters
  int n_mode [5];
  int n_chain = 0, n_rekey = 0, n_ignored_en = 0;
  int n_ke_gated = 0, n_sbox_key = 0, n_sr = 0, n_isr = 0, n_mc = 0, n_imc = 0, n_ike = 0;

  always @(posedge clk) begin
    if (dut.u_modes.u_enc.key_en && dut.u_modes.u_enc.key_op == KEY_EXP) begin
      if (!dut.u_modes.u_enc.st_en && !dut.u_modes.u_enc.mc_en) n_ke_gated++;
      if (dut.u_modes.u_enc.sb_in == dut.u_modes.u_enc.key_sb_in) n_sbox_key++;
    end
    if (dut.u_modes.u_enc.st_en && dut.u_modes.u_enc.st_op == ST_SR) n_sr++;
    if (dut.u_modes.u_dec.st_en && dut.u_modes.u_dec.st_op == ST_ISR) n_isr++;
    if (dut.u_modes.u_enc.mc_en) n_mc++;
    if (dut.u_modes.u_dec.mc_en) n_imc++;
    if (dut.u_modes.u_dec.key_en && dut.u_modes.u_dec.key_op == KEY_IEXP) n_ike++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic load_key(input logic [2:0] m, input logic [127:0] k, input logic [127:0] v);
    mode = m; key = k; iv = v; kld = 1'b1;
    @(posedge clk); #1;
    kld = 1'b0; key = '0; iv = '0; mode = 3'd7;
    n_rekey++;
  endtask

  // Expected cycles from en to the complete flags.
  function automatic int enc_lat();
    return 529;
  endfunction
  function automatic int dec_lat(input logic [2:0] m);
    return (m <= 3'd1) ? 529 + 688 : 529 + 528;
  endfunction

  task automatic send(input logic [2:0] m, input logic [127:0] k, input logic [127:0] pt,
                      inout logic [127:0] fb, input bit poke);
    logic [127:0] exp_ct;
    int cyc;
    exp_ct = r_mode(int'(m), 1'b0, k, pt, fb);
    text_in = pt; en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0; text_in = ~pt;
    cyc = 1;
    chk(!enc_complete && !dec_complete, "complete flags cleared by en");
    while (!enc_complete) begin
      @(posedge clk); #1;
      cyc++;
      if (poke && cyc == 100) begin
        // en while busy must be ignored
        en = 1'b1; text_in = 128'h0;
        @(posedge clk); #1;
        en = 1'b0; cyc++;
        n_ignored_en++;
      end
    end
    chk(enc_data === exp_ct, $sformatf("mode %0d enc_data %032h expected %032h", m, enc_data, exp_ct));
    chk(cyc == enc_lat(), $sformatf("enc latency %0d", cyc));
    while (!dec_complete) begin
      @(posedge clk); #1;
      cyc++;
    end
    chk(dec_data === pt, $sformatf("mode %0d dec_data %032h expected %032h", m, dec_data, pt));
    chk(cyc == dec_lat(m), $sformatf("dec latency %0d expected %0d", cyc, dec_lat(m)));
    chk(enc_complete && enc_data === exp_ct, "enc_data held");
    n_mode[m]++;
    repeat (3) @(posedge clk);
    #1;
    chk(dec_complete && enc_complete, "flags held");
  endtask

  initial begin
    logic [127:0] k, v, fb;
    #1 rst = 1'b1;
    #20 rst = 1'b0;
    @(posedge clk); #1;
    chk(!enc_complete && !dec_complete && enc_data == '0, "reset state");
    for (int m = 0; m < 5; m++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      v = {$urandom, $urandom, $urandom, $urandom};
      load_key(3'(m), k, v);
      fb = v;
      // "AES Project" in ASCII, padded with spaces
      send(3'(m), k, {"AES Project", {5{8'h20}}}, fb, m == 2);
      for (int b = 0; b < 3; b++) begin
        send(3'(m), k, {$urandom, $urandom, $urandom, $urandom}, fb, 1'b0);
        n_chain++;
      end
    end
    for (int m = 0; m < 5; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("FAIL mode %0d never used", m); end
    end
    chk(n_chain > 0, "chaining never exercised");
    chk(n_rekey > 1, "re-keying never exercised");
    chk(n_ignored_en > 0, "busy en never exercised");
    chk(n_ke_gated > 0, "key expansion with gated state never seen");
    chk(n_sbox_key > 0, "shared S-box never used by the key schedule");
    chk(n_sr > 0, "ShiftRows never seen");
    chk(n_isr > 0, "InvShiftRows never seen");
    chk(n_mc > 0, "MixColumns never used");
    chk(n_imc > 0, "InvMixColumns never used");
    chk(n_ike > 0, "inverse key expansion never seen");
    $display("mechanisms: modes %0d/%0d/%0d/%0d/%0d chained %0d rekey %0d busy-en %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_mode[4], n_chain, n_rekey, n_ignored_en);
    $display("mechanisms: gated-KE cycles %0d key S-box cycles %0d SR %0d ISR %0d MC %0d IMC %0d IKE %0d",
             n_ke_gated, n_sbox_key, n_sr, n_isr, n_mc, n_imc, n_ike);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
