// tb_aes_modes -- modes of operation unit.
// For each mode (ECB, CBC, CFB, OFB, CTR) a stream of four random blocks is
// encrypted and the ciphertext stream is then decrypted, both compared block
// by block with the reference model, which carries its own chaining values.
// The first block of the NIST SP 800-38A example for each mode (AES-128 key
// 2b7e1516..., plaintext 6bc1bee2...) is checked against the published
// ciphertext. Latency is checked: 528 cycles through the encryption core,
// 688 through the decryption core (ECB and CBC decryption).
module tb_aes_modes;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 1, init = 0, start = 0, decrypt = 0;
  mode_e mode = MODE_ECB;
  logic [127:0] key = '0, iv = '0, din = '0, dout;
  logic busy, done;
  int checks = 0, failures = 0;

  aes_modes dut (.clk, .rst_n, .mode, .key, .iv, .init, .start, .decrypt, .din,
                 .dout, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_init(input logic [127:0] k, input logic [127:0] v);
    key = k; iv = v; init = 1'b1;
    @(posedge clk); #1;
    init = 1'b0;
  endtask

  task automatic block(input bit dec, input logic [127:0] x, input logic [127:0] exp,
                       output logic [127:0] got);
    int cyc, lat;
    decrypt = dec; din = x; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0; din = ~x;
    cyc = 1;
    while (!done) begin
      @(posedge clk); #1;
      cyc++;
    end
    got = dout;
    lat = (dec && (mode == MODE_ECB || mode == MODE_CBC)) ? 688 : 528;
    checks += 2;
    if (dout !== exp) begin
      failures++;
      $display("FAIL mode %0d dec %0d: got %032h expected %032h", mode, dec, dout, exp);
    end
    if (cyc != lat) begin
      failures++;
      $display("FAIL mode %0d dec %0d latency %0d expected %0d", mode, dec, cyc, lat);
    end
  endtask

  logic [127:0] kk, vv, fb, got;
  logic [127:0] pt [4];
  logic [127:0] ct [4];
  logic [127:0] kat [5] = '{128'h3ad77bb40d7a3660a89ecaf32466ef97,
                            128'h7649abac8119b246cee98e9b12e9197d,
                            128'h3b3fd92eb72dad20333449f8e83cfb4a,
                            128'h3b3fd92eb72dad20333449f8e83cfb4a,
                            128'h874d6191b620e3261bef6864990db6ce};

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int m = 0; m < 5; m++) begin
      mode = mode_e'(m);
      // published first block
      vv = (m == 4) ? 128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff : 128'h000102030405060708090a0b0c0d0e0f;
      do_init(128'h2b7e151628aed2a6abf7158809cf4f3c, vv);
      block(1'b0, 128'h6bc1bee22e409f96e93d7e117393172a, kat[m], got);
      // random stream, encrypt then decrypt
      kk = {$urandom, $urandom, $urandom, $urandom};
      vv = {$urandom, $urandom, $urandom, $urandom};
      do_init(kk, vv);
      fb = vv;
      for (int b = 0; b < 4; b++) begin
        pt[b] = {$urandom, $urandom, $urandom, $urandom};
        ct[b] = r_mode(m, 1'b0, kk, pt[b], fb);
        block(1'b0, pt[b], ct[b], got);
      end
      do_init(kk, vv);
      for (int b = 0; b < 4; b++) block(1'b1, ct[b], pt[b], got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
