// Decryptor (receive side): turns one encrypted byte into one plain byte.
//
// Chain: shift_reg (parallel to serial, LSB first) -> stream_cipher (XOR
// with the Geffe keystream) -> s_to_p_data_conv (serial to parallel) ->
// optional decompressor. Because the cipher is a plain XOR, this is the same
// chain as the encryptor behind the ADC, and its keystream must be at the
// same position: both ends start from the fixed keys at reset and advance 8
// keystream bits per byte.
//
// Interface: present din with valid_in high for one cycle while busy is
// low; busy then stays high until the byte leaves. dout/valid_out: the
// decrypted byte and a one-cycle strobe, 10 clocks after valid_in (11 with
// comp_en high, when the decompressor's hold register is in the path).
// The busy flag and the comp_en bypass are this design's choices.
module dac_cipher_connect
  import safetalk_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    comp_en,
  input  logic    valid_in,
  input  sample_t din,
  output logic    valid_out,
  output sample_t dout,
  output logic    busy
);
  logic    ser_v, ser_d, ser_busy;
  logic    cip_v, cip_d;
  logic    par_v, dc_v;
  sample_t par_d, dc_d;

  shift_reg u_shift_reg (
    .clk, .rst_n, .valid_in(valid_in && !busy), .din,
    .valid_out(ser_v), .dout(ser_d), .busy(ser_busy)
  );

  stream_cipher u_stream_cipher (
    .clk, .rst_n, .valid_in(ser_v), .din(ser_d),
    .valid_out(cip_v), .dout(cip_d)
  );

  s_to_p_data_conv u_s_to_p (
    .clk, .rst_n, .valid(cip_v), .din(cip_d),
    .dout(par_d), .valid_out(par_v)
  );

  decompressor u_decompressor (
    .clk, .rst_n, .enable(comp_en), .valid_in(par_v), .din(par_d),
    .valid_out(dc_v), .dout(dc_d)
  );

  assign valid_out = comp_en ? dc_v : par_v;
  assign dout      = comp_en ? dc_d : par_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  busy <= 1'b0;
    else if (valid_in && !busy)  busy <= 1'b1;
    else if (valid_out)          busy <= 1'b0;
  end
endmodule
