// tb_aes_state_reg -- State-Register operations.
// Checks the parallel load, ShiftRows on the FIPS-197 round-1 value
// (d42711ae... -> d4bf5d30...), InvShiftRows back, ShiftRows/InvShiftRows of
// random states against the reference, a sixteen-byte shift pass (bytes
// leave in order on dout, new bytes fill from position 15) and that nothing
// changes while en is low.
module tb_aes_state_reg;
  import aes_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 1, en = 0;
  st_op_e op = ST_LOAD;
  logic [127:0] load_data = '0, state, v, nv;
  logic [7:0] din = 0, dout;
  int checks = 0, failures = 0;

  aes_state_reg dut (.clk, .rst_n, .en, .op, .load_data, .din, .dout, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic do_op(input st_op_e o, input logic [127:0] ld, input logic [7:0] d);
    op = o; load_data = ld; din = d; en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    chk(state, '0, "reset");
    @(posedge clk); #1;
    do_op(ST_LOAD, 128'hd42711aee0bf98f1b8b45de51e415230, 8'h00);
    chk(state, 128'hd42711aee0bf98f1b8b45de51e415230, "load");
    do_op(ST_SR, '0, 8'h00);
    chk(state, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "ShiftRows FIPS");
    do_op(ST_ISR, '0, 8'h00);
    chk(state, 128'hd42711aee0bf98f1b8b45de51e415230, "InvShiftRows FIPS");
    // en low: operations must not take effect
    op = ST_SR; en = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    chk(state, 128'hd42711aee0bf98f1b8b45de51e415230, "gated hold");
    for (int n = 0; n < 20; n++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      do_op(ST_LOAD, v, 8'h00);
      do_op(ST_SR, '0, 8'h00);
      chk(state, r_shift_rows(v, 0), "ShiftRows random");
      do_op(ST_ISR, '0, 8'h00);
      do_op(ST_ISR, '0, 8'h00);
      chk(state, r_shift_rows(v, 1), "InvShiftRows random");
      do_op(ST_SR, '0, 8'h00);
      // shift pass: read bytes out in order, write new bytes in
      nv = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (dout !== gb(v, i)) begin
          failures++;
          $display("FAIL shift out byte %0d: %02h vs %02h", i, dout, gb(v, i));
        end
        do_op(ST_SHIFT, '0, gb(nv, i));
      end
      chk(state, nv, "shift pass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
