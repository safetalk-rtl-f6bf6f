// Bit-serial XOR stream cipher, identical for encryption and decryption:
// c_i = p_i ^ k_i and p_i = c_i ^ k_i with the same keystream.
//
// A 1-bit, 2-input register latches the incoming data bit and the current
// keystream bit on the clock edge at which valid_in is high; the output is
// their XOR, with valid_out high one cycle after valid_in. The keystream
// generator advances only on valid bits, so the two ends stay aligned as
// long as both have seen the same number of bits since reset, whatever the
// gaps between them (advancing on valid bits rather than on every clock is
// this design's choice). Latency: one clock.
module stream_cipher (
  input  logic clk,
  input  logic rst_n,
  input  logic valid_in,
  input  logic din,
  output logic valid_out,
  output logic dout
);
  logic key_bit;
  logic d_q, k_q;

  key_generator u_key_generator (.clk, .rst_n, .en(valid_in), .key_bit);

  // reg3_1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q       <= 1'b0;
      k_q       <= 1'b0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        d_q <= din;
        k_q <= key_bit;
      end
    end
  end

  assign dout = d_q ^ k_q;
endmodule
