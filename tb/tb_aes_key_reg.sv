// tb_aes_key_reg -- Key-Register with byte-serial key expansion.
// The shared S-box is modelled here by the reference S-box and the round
// constant is supplied by the testbench. Starting from the FIPS-197 key and
// from random keys, ten forward expansions must reproduce every round key
// of the reference schedule (the FIPS-197 last round key d014f9a8... is
// checked too), sixteen rotations must stream a round key on kout and
// restore it, and ten inverse expansions must walk back to the cipher key.
module tb_aes_key_reg;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 1, en = 0;
  key_op_e op = KEY_LOAD;
  logic [3:0] step = 0;
  logic [127:0] load_key = '0, key;
  logic [7:0] rcon = 8'h01, sbox_in, sbox_out, kout;
  int checks = 0, failures = 0;
  rk_t rk;
  logic [7:0] rc_tab [11] = '{8'h00, 8'h01, 8'h02, 8'h04, 8'h08, 8'h10,
                              8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  assign sbox_out = r_sbox(sbox_in);

  aes_key_reg dut (.clk, .rst_n, .en, .op, .step, .load_key, .rcon, .sbox_out,
                   .sbox_in, .kout, .key);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic run16(input key_op_e o);
    for (int t = 0; t < 16; t++) begin
      op = o; step = 4'(t); en = 1'b1;
      @(posedge clk); #1;
    end
    en = 1'b0;
  endtask

  task automatic one_key(input logic [127:0] k, input bit fips);
    rk = r_expand(k);
    op = KEY_LOAD; load_key = k; en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
    chk(key, k, "load");
    for (int r = 1; r <= 10; r++) begin
      rcon = rc_tab[r];
      run16(KEY_EXP);
      chk(key, rk[r], $sformatf("forward round key %0d", r));
    end
    if (fips) chk(key, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS K10");
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (kout !== gb(rk[10], i)) begin failures++; $display("FAIL kout byte %0d", i); end
      op = KEY_ROT; en = 1'b1;
      @(posedge clk); #1;
    end
    en = 1'b0;
    chk(key, rk[10], "after rotation");
    for (int r = 10; r >= 1; r--) begin
      rcon = rc_tab[r];
      run16(KEY_IEXP);
      chk(key, rk[r-1], $sformatf("inverse round key %0d", r - 1));
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    chk(key, '0, "reset");
    @(posedge clk); #1;
    one_key(128'h2b7e151628aed2a6abf7158809cf4f3c, 1'b1);
    for (int n = 0; n < 5; n++) one_key({$urandom, $urandom, $urandom, $urandom}, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
