// tb_aes_rcon -- round-constant register.
// After a load the ten forward steps must give the FIPS-197 constants
// 01 02 04 08 10 20 40 80 1b 36, the next value is 6c, and stepping back
// must retrace the same values; with en low the value must hold.
module tb_aes_rcon;
  import aes_pkg::*;
  logic clk = 0, rst_n = 1, en = 0;
  rc_op_e op = RC_LOAD;
  logic [7:0] rcon;
  logic [7:0] exp_rc [11] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20,
                              8'h40, 8'h80, 8'h1b, 8'h36, 8'h6c};
  int checks = 0, failures = 0;

  aes_rcon dut (.clk, .rst_n, .en, .op, .rcon);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [7:0] exp, input string what);
    checks++;
    if (rcon !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, rcon, exp);
    end
  endtask

  task automatic step(input rc_op_e o);
    op = o; en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    chk(8'h01, "reset");
    @(posedge clk); #1;
    step(RC_NEXT); step(RC_NEXT);
    step(RC_LOAD);
    chk(8'h01, "load");
    for (int r = 1; r <= 10; r++) begin
      step(RC_NEXT);
      chk(exp_rc[r], $sformatf("next %0d", r));
    end
    op = RC_NEXT;
    repeat (4) @(posedge clk);
    #1;
    chk(8'h6c, "gated hold");
    for (int r = 9; r >= 0; r--) begin
      step(RC_PREV);
      chk(exp_rc[r], $sformatf("prev %0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
