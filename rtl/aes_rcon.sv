// aes_rcon -- round-constant register with its own clock gate.
//
// Holds the byte Rcon used by the first word of each key-expansion step.
// RC_LOAD sets it to 01; RC_NEXT multiplies it by x in GF(2^8) (01, 02, 04,
// ..., 80, 1b, 36 for rounds 1..10); RC_PREV divides by x, which the
// decryption key schedule needs when it walks the round keys backwards.
// The register is clocked only when en is high, as the published design applies clock
// gating to the RCON register separately. The backward step is this design's
// addition for decryption.
//
// Interface: clk, rst_n (async, active low, resets to 01), en, op (rc_op_e),
// rcon (current value, changes on the clock edge after an enabled op).
module aes_rcon
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  rc_op_e     op,
  output logic [7:0] rcon
);
  logic gclk;

  aes_clock_gate u_cg (.clk(clk), .en(en), .gclk(gclk));

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) rcon <= 8'h01;
    else begin
      unique case (op)
        RC_NEXT: rcon <= xtime(rcon);
        RC_PREV: rcon <= xdiv(rcon);
        default: rcon <= 8'h01;
      endcase
    end
  end
endmodule
