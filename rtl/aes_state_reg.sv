// aes_state_reg -- the 16-byte State-Register with ShiftRows built in.
//
// The register holds the AES state as bytes s[0..15] in FIPS-197 order
// (s[r+4c] is row r, column c; s[0] is bits [127:120] of the block). For
// the 8-bit datapath it is a byte shift register: ST_SHIFT moves every byte
// down one place, s[0] leaves on dout and din enters at s[15], so sixteen
// shifts pass the whole state once through the byte-wide round logic and
// leave it back in order. ShiftRows and InvShiftRows need no logic of their
// own: ST_SR / ST_ISR reload the register with a permutation of its own
// contents in one cycle (row r rotated left / right by r columns). ST_LOAD
// takes a whole block in parallel. Putting ShiftRows inside the register
// follows the published design; the parallel load and the one-cycle permutation are this
// design's reading of it.
//
// Interface: clk, rst_n (async, active low), en (clock-gate enable: the
// register is clocked only when en is high), op (st_op_e), load_data, din,
// dout (= s[0], combinational), state (the whole register as a block).
module aes_state_reg
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  st_op_e       op,
  input  logic [127:0] load_data,
  input  logic [7:0]   din,
  output logic [7:0]   dout,
  output logic [127:0] state
);
  logic       gclk;
  logic [7:0] s [16];

  aes_clock_gate u_cg (.clk(clk), .en(en), .gclk(gclk));

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) s[i] <= 8'h00;
    end else begin
      unique case (op)
        ST_LOAD: for (int i = 0; i < 16; i++) s[i] <= load_data[127 - 8*i -: 8];
        ST_SHIFT: begin
          for (int i = 0; i < 15; i++) s[i] <= s[i + 1];
          s[15] <= din;
        end
        ST_SR:
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++)
              s[r + 4*c] <= s[r + 4*((c + r) % 4)];
        default:  // ST_ISR
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++)
              s[r + 4*c] <= s[r + 4*((c - r + 4) % 4)];
      endcase
    end
  end

  assign dout = s[0];

  always_comb begin
    for (int i = 0; i < 16; i++) state[127 - 8*i -: 8] = s[i];
  end
endmodule
