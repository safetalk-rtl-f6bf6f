// Linear feedback shift register used as a keystream source.
//
// The register shifts one place to the right each cycle en is high. The bit
// that leaves at the LSB is the output bit (out_bit shows it before the
// shift), and the new MSB is the XOR of the register bits selected by TAPS
// (bit i-1 of TAPS stands for polynomial term x^i). Reset loads SEED, the
// fixed key, so every reset restarts the same sequence. With a primitive
// polynomial the period is 2^WIDTH-1; the published 8-, 11- and 13-bit tap
// sets, applied in this shift direction, are not maximal and give periods
// of 105, 889 and 6141 instead (kept, since both ends only need to agree
// and the published test vectors depend on them). The shift direction, output bit, taps
// and seeds follow the published design; the defaults are its 8-bit
// register x^8+x^4+x^3+x^2+1 with key 0x08. The enable and the asynchronous
// active-low reset are this design's interface choices.
module lfsr #(
  parameter int unsigned      WIDTH = 8,
  parameter logic [WIDTH-1:0] TAPS  = 8'h8E,
  parameter logic [WIDTH-1:0] SEED  = 8'h08
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic             out_bit,
  output logic [WIDTH-1:0] state
);
  logic feedback;

  assign feedback = ^(state & TAPS);
  assign out_bit  = state[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {feedback, state[WIDTH-1:1]};
  end

  initial assert (SEED != '0) else $error("an all-zero LFSR seed locks up");
endmodule
