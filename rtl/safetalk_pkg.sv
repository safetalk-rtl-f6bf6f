// Shared types and constants of the SafeTalk secure-voice datapath.
//
// sample_t is the 8-bit audio sample that flows from the ADC through the
// cipher, the FIFOs and the UART to the DAC. The LFSR constants define the
// three registers of the Geffe keystream generator: the feedback polynomials
// x^8+x^4+x^3+x^2+1, x^11+x^2+1 and x^13+x^4+x^3+x+1 and the fixed keys
// (seeds) 0x08, 0x00B and 0x000D are the published ones. A tap mask has bit
// i-1 set for polynomial term x^i (bit 1 is the register's LSB, the output
// bit). Reset and handshake conventions are this design's choice: one
// active-low asynchronous reset and one main clock with clock enables.
package safetalk_pkg;

  typedef logic [7:0] sample_t;

  localparam int unsigned        LFSR8_W    = 8;
  localparam logic [7:0]         LFSR8_TAPS = 8'h8E;     // bits 8,4,3,2
  localparam logic [7:0]         LFSR8_SEED = 8'h08;

  localparam int unsigned        LFSR11_W    = 11;
  localparam logic [10:0]        LFSR11_TAPS = 11'h402;  // bits 11,2
  localparam logic [10:0]        LFSR11_SEED = 11'h00B;

  localparam int unsigned        LFSR13_W    = 13;
  localparam logic [12:0]        LFSR13_TAPS = 13'h100D; // bits 13,4,3,1
  localparam logic [12:0]        LFSR13_SEED = 13'h000D;

  // UART frame: start + 8 data + parity + stop
  localparam int unsigned UART_FRAME_BITS = 11;
  localparam int unsigned UART_OVERSAMPLE = 16;

  // Even parity bit over a byte (set when the byte holds an odd number of ones)
  function automatic logic parity_bit(input sample_t d, input logic odd);
    return (^d) ^ odd;
  endfunction

endpackage
