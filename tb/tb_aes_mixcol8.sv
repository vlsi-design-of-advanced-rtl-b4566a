// tb_aes_mixcol8 -- byte-serial MixColumns and InvMixColumns.
// Two instances (forward and inverse) receive the same stream of random
// columns, one byte per cycle with last on every fourth byte; each output
// byte is compared four cycles after its input with the reference column
// transform. The FIPS-197 column db 13 53 45 -> 8e 4d a1 bc is included, and
// a pause with en low must hold the unit's state.
module tb_aes_mixcol8;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 1, en = 0, last = 0;
  logic [7:0] din = 0, dout_f, dout_i;
  int checks = 0, failures = 0;
  logic [7:0] exp_f [$], exp_i [$];
  int ncol = 0;

  aes_mixcol8 #(.INVERSE(1'b0)) dut_f (.clk, .rst_n, .en, .last, .din, .dout(dout_f));
  aes_mixcol8 #(.INVERSE(1'b1)) dut_i (.clk, .rst_n, .en, .last, .din, .dout(dout_i));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_col(input logic [31:0] w);
    logic [31:0] f, iv;
    f  = r_mix_word(w, 0);
    iv = r_mix_word(w, 1);
    for (int i = 0; i < 4; i++) begin
      exp_f.push_back(f[31 - 8*i -: 8]);
      exp_i.push_back(iv[31 - 8*i -: 8]);
    end
    for (int i = 0; i < 4; i++) begin
      din = w[31 - 8*i -: 8];
      last = (i == 3);
      en = 1'b1;
      // outputs of the previous column leave while this one enters
      if (ncol > 0) begin
        checks += 2;
        if (dout_f !== exp_f[0]) begin failures++; $display("FAIL fwd got %02h exp %02h", dout_f, exp_f[0]); end
        if (dout_i !== exp_i[0]) begin failures++; $display("FAIL inv got %02h exp %02h", dout_i, exp_i[0]); end
        void'(exp_f.pop_front());
        void'(exp_i.pop_front());
      end
      @(posedge clk);
      #1;
    end
    ncol++;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    send_col(32'hdb135345);
    send_col(32'hf20a225c);
    for (int n = 0; n < 30; n++) begin
      if (n == 10) begin
        // pause: clocks gated off, the queued outputs must survive
        en = 1'b0; last = 1'b0; din = 8'hff;
        repeat (3) @(posedge clk);
        #1;
      end
      send_col($urandom);
    end
    send_col(32'h0);  // flush the last real column
    checks++;
    if (ncol != 33) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
