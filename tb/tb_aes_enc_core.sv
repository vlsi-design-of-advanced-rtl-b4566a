// tb_aes_enc_core -- AES-128 encryption core.
// Runs the FIPS-197 Appendix B and C.1 vectors and random key/block pairs
// through the core and compares the ciphertext with the reference model. The
// latency from the start cycle to done must be 527 cycles, done must be
// a single-cycle pulse, and dout must hold after done.
module tb_aes_enc_core;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  logic [127:0] key = '0, din = '0, dout;
  logic busy, done;
  int checks = 0, failures = 0;

  aes_enc_core dut (.clk, .rst_n, .start, .key, .din, .dout, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] k, input logic [127:0] x, input logic [127:0] exp);
    int cyc;
    key = k; din = x; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    // the inputs may change once the block has been taken
    key = ~k; din = ~x;
    cyc = 1;
    while (!done) begin
      @(posedge clk); #1;
      cyc++;
    end
    checks += 2;
    if (dout !== exp) begin
      failures++;
      $display("FAIL key %032h in %032h: got %032h expected %032h", k, x, dout, exp);
    end
    if (cyc != 527) begin
      failures++;
      $display("FAIL latency %0d cycles, expected 527", cyc);
    end
    @(posedge clk); #1;
    checks += 2;
    if (done !== 1'b0 || busy !== 1'b0) begin failures++; $display("FAIL done not a pulse"); end
    if (dout !== exp) begin failures++; $display("FAIL dout not held"); end
  endtask

  initial begin
    logic [127:0] k, p;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    @(posedge clk); #1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int n = 0; n < 20; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, r_encrypt(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
