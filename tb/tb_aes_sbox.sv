// tb_aes_sbox -- exhaustive check of the combined S-box.
// Every byte is passed through SubBytes and InvSubBytes and compared with
// the reference package, whose inverse is found by search rather than by
// exponentiation; three FIPS-197 table entries are also checked directly.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic       inv;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  aes_sbox dut (.inv, .din, .dout);

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      inv = 1'b0; din = 8'(x); #1;
      check(dout, r_sbox(8'(x)), $sformatf("S(%02h)", x));
      inv = 1'b1; #1;
      check(dout, r_inv_sbox(8'(x)), $sformatf("InvS(%02h)", x));
    end
    inv = 1'b0; din = 8'h00; #1; check(dout, 8'h63, "S(00)");
    din = 8'h53; #1; check(dout, 8'hed, "S(53)");
    inv = 1'b1; din = 8'h63; #1; check(dout, 8'h00, "InvS(63)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
