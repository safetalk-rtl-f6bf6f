// Decompressor: the receive-side counterpart of the compressor. It holds
// each sample that arrives until the next one comes, so the DAC sees a
// steady staircase at the reduced sample rate (a zero-order hold).
//
// With enable high, a valid_in sample is registered into dout and
// valid_out is high for one cycle; dout keeps its value otherwise. With
// enable low dout is frozen and nothing is flagged. Same interface as the
// compressor, as published; the one-clock latency is this design's choice.
module decompressor
  import safetalk_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    enable,
  input  logic    valid_in,
  input  sample_t din,
  output logic    valid_out,
  output sample_t dout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout      <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= enable && valid_in;
      if (enable && valid_in) dout <= din;
    end
  end
endmodule
