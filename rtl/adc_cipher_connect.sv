// ADC and encryptor (send side): reads samples from an ADC0809 and turns
// each one into an encrypted byte.
//
// clock_divider makes the converter's slow clock (clk / (2*ADC_DIVISOR));
// input_reader runs the sample-and-hold / start / end-of-conversion cycle
// on its falling edges and flags each new sample. With comp_en high the
// compressor keeps one sample in COMP_N. A kept sample is then encrypted by
// shift_reg -> stream_cipher -> s_to_p_data_conv, the same chain as the
// decryptor, unless the path is still busy with the previous byte or the
// downstream buffer has no room (allow low): then the sample is dropped
// before it touches the keystream and dropped pulses. Dropping before
// encryption keeps the two ends' keystreams aligned; this and the allow
// input are this design's choices, the rest follows the published
// hierarchy. Encrypted bytes appear on dout with a one-cycle valid_out
// 10 clocks after the sample is accepted.
module adc_cipher_connect
  import safetalk_pkg::*;
#(
  parameter int unsigned ADC_DIVISOR = 15,
  parameter int unsigned COMP_N      = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    comp_en,     // 1: keep one sample in COMP_N
  input  logic    allow,       // downstream has room for one more byte
  // ADC0809 / SMP11 pins
  input  sample_t adc_bits,
  input  logic    adc_eoc,
  output logic    adc_soc,
  output logic    adc_sample,
  output logic    adc_clk,
  // encrypted bytes
  output logic    valid_out,
  output sample_t dout,
  output logic    busy,
  output logic    dropped
);
  logic    fall_tick, rise_tick;
  logic    rd_v, cp_v, cand_v, take;
  sample_t rd_d, cp_d, cand_d;
  logic    ser_v, ser_d, ser_busy, cip_v, cip_d;

  clock_divider #(.DIVISOR(ADC_DIVISOR)) u_clock_divider (
    .clk, .rst_n, .slow_clock(adc_clk), .rise_tick, .fall_tick
  );

  input_reader u_input_reader (
    .clk, .rst_n, .fall_tick, .bits(adc_bits), .eoc(adc_eoc),
    .sample(adc_sample), .soc(adc_soc), .hold_out(rd_d), .valid_out(rd_v)
  );

  compressor #(.N(COMP_N)) u_compressor (
    .clk, .rst_n, .enable(comp_en), .valid_in(rd_v), .din(rd_d),
    .valid_out(cp_v), .dout(cp_d)
  );

  assign cand_v  = comp_en ? cp_v : rd_v;
  assign cand_d  = comp_en ? cp_d : rd_d;
  assign take    = cand_v && allow && !busy;
  assign dropped = cand_v && !take;

  shift_reg u_shift_reg (
    .clk, .rst_n, .valid_in(take), .din(cand_d),
    .valid_out(ser_v), .dout(ser_d), .busy(ser_busy)
  );

  stream_cipher u_stream_cipher (
    .clk, .rst_n, .valid_in(ser_v), .din(ser_d),
    .valid_out(cip_v), .dout(cip_d)
  );

  s_to_p_data_conv u_s_to_p (
    .clk, .rst_n, .valid(cip_v), .din(cip_d),
    .dout, .valid_out
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         busy <= 1'b0;
    else if (take)      busy <= 1'b1;
    else if (valid_out) busy <= 1'b0;
  end
endmodule
