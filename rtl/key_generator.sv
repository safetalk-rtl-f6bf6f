// Geffe keystream generator.
//
// Three LFSRs of relatively prime lengths (8, 11 and 13 bits, the published
// tap sets and fixed keys) shift together whenever en is high. A 2-to-1
// multiplexer combines their output bits non-linearly:
//   key_bit = sel ? a : b  =  (sel & a) ^ (~sel & b)
// with sel the 13-bit register's output, a the 8-bit and b the 11-bit one,
// as published. The published description expects maximal-length
// registers (periods 255, 2047, 8191); with the published taps they cycle
// after 105, 889 (after one start-up step) and 6141 steps, so the combined
// stream repeats after lcm(105, 889, 6141) = 27,296,745 bits, about 3.4
// million bytes or about seven minutes at the full line rate. key_bit is the bit for the current cycle;
// asserting en consumes it. Which multiplexer input the 8-bit register
// drives is read from the published formula and checked against its
// simulation table; the enable is this design's choice.
module key_generator
  import safetalk_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic key_bit
);
  logic a8, b11, s13;
  logic [LFSR8_W-1:0]  st8;
  logic [LFSR11_W-1:0] st11;
  logic [LFSR13_W-1:0] st13;

  lfsr #(.WIDTH(LFSR8_W),  .TAPS(LFSR8_TAPS),  .SEED(LFSR8_SEED))
    u_shift_reg8  (.clk, .rst_n, .en, .out_bit(a8),  .state(st8));
  lfsr #(.WIDTH(LFSR11_W), .TAPS(LFSR11_TAPS), .SEED(LFSR11_SEED))
    u_shift_reg11 (.clk, .rst_n, .en, .out_bit(b11), .state(st11));
  lfsr #(.WIDTH(LFSR13_W), .TAPS(LFSR13_TAPS), .SEED(LFSR13_SEED))
    u_shift_reg13 (.clk, .rst_n, .en, .out_bit(s13), .state(st13));

  // mux2_1
  assign key_bit = s13 ? a8 : b11;
endmodule
