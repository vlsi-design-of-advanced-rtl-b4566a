// tb_aes_round_trace -- round-1 intermediate values of the encryption core.
// Encrypts the FIPS-197 Appendix B block (key 2b7e1516..., plaintext
// 3243f6a8...) and watches the core's registers during round 1:
//   after the SubBytes pass   state = d42711aee0bf98f1b8b45de51e415230
//   after ShiftRows           state = d4bf5d30e0b452aeb84111f11e2798e5
//   after key expansion       round key 1 = a0fafe1788542cb123a339392a6c7605
//   MixColumns output stream  046681e5e0cb199a48f8d37a2806264c
//   after AddRoundKey         state = a49c7ff2689f352b6b5bea43026a5049
// and finally the ciphertext 3925841d02dc09fbdc118597196a0b32.
module tb_aes_round_trace;
  import aes_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  logic [127:0] key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  logic [127:0] din = 128'h3243f6a8885a308d313198a2e0370734;
  logic [127:0] dout, mc;
  logic busy, done;
  int checks = 0, failures = 0;

  aes_enc_core dut (.clk, .rst_n, .start, .key, .din, .dout, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  // Wait until the controller enters the given phase, then return just
  // after that edge.
  task automatic wait_phase(input logic [2:0] ph);
    while (dut.phase != ph) begin
      @(posedge clk); #1;
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    @(posedge clk); #1;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    wait_phase(3'(dut.P_SR));
    chk(dut.state, 128'hd42711aee0bf98f1b8b45de51e415230, "after SubBytes");
    wait_phase(3'(dut.P_KE));
    chk(dut.state, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "after ShiftRows");
    wait_phase(3'(dut.P_MC));
    chk(dut.u_key.key, 128'ha0fafe1788542cb123a339392a6c7605, "round key 1");
    repeat (4) begin
      @(posedge clk); #1;
    end
    for (int i = 0; i < 16; i++) begin
      mc[127 - 8*i -: 8] = dut.mc_out;
      @(posedge clk); #1;
    end
    chk(mc, 128'h046681e5e0cb199a48f8d37a2806264c, "MixColumns output");
    chk(dut.state, 128'ha49c7ff2689f352b6b5bea43026a5049, "after AddRoundKey");
    while (!done) begin
      @(posedge clk); #1;
    end
    chk(dout, 128'h3925841d02dc09fbdc118597196a0b32, "ciphertext");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
