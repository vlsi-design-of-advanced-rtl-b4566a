// aes_mixcol8 -- byte-serial MixColumns (INVERSE=0) or InvMixColumns
// (INVERSE=1) with 8-bit input and output and four internal registers.
//
// Column bytes a0..a3 arrive one per cycle on din, with last=1 on a3. The
// four registers r0..r3 form a queue: every enabled cycle dout = r0 and the
// queue moves up by one with din entering at r3. When last=1, r1..r3 hold
// a0..a2 and din is a3, so the complete column is known; instead of the
// plain move, all four registers are loaded with the mixed bytes b0..b3.
// They then leave on dout in the next four cycles while the next column's
// bytes fill the queue behind them. The result is one byte in and one byte
// out per cycle, with b_i on dout exactly four cycles after a_i went in.
//   MixColumns    b_i = 2a_i ^ 3a_{i+1} ^  a_{i+2} ^  a_{i+3}
//   InvMixColumns b_i = e a_i ^ b a_{i+1} ^ d a_{i+2} ^ 9 a_{i+3}
// Four registers and 8-bit in/out are from the published design; the queue scheme and
// the inverse variant are this design's own.
//
// Interface: clk, rst_n (async, active low), en (clock-gate enable: the
// registers are clocked only when en is high), last, din, dout.
module aes_mixcol8
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       last,
  input  logic [7:0] din,
  output logic [7:0] dout
);
  localparam logic [7:0] C0 = INVERSE ? 8'h0e : 8'h02;
  localparam logic [7:0] C1 = INVERSE ? 8'h0b : 8'h03;
  localparam logic [7:0] C2 = INVERSE ? 8'h0d : 8'h01;
  localparam logic [7:0] C3 = INVERSE ? 8'h09 : 8'h01;

  logic       gclk;
  logic [7:0] r [4];
  logic [7:0] a [4];
  logic [7:0] b [4];

  aes_clock_gate u_cg (.clk(clk), .en(en), .gclk(gclk));

  always_comb begin
    a[0] = r[1];
    a[1] = r[2];
    a[2] = r[3];
    a[3] = din;
    for (int i = 0; i < 4; i++) begin
      b[i] = gmul(C0, a[i]) ^ gmul(C1, a[(i + 1) % 4]) ^
             gmul(C2, a[(i + 2) % 4]) ^ gmul(C3, a[(i + 3) % 4]);
    end
  end

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) r[i] <= 8'h00;
    end else if (last) begin
      for (int i = 0; i < 4; i++) r[i] <= b[i];
    end else begin
      r[0] <= r[1];
      r[1] <= r[2];
      r[2] <= r[3];
      r[3] <= din;
    end
  end

  assign dout = r[0];
endmodule
