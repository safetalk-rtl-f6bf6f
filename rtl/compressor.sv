// Sample-rate compressor: keeps one valid sample in every N and drops the
// others, cutting the data rate by N before encryption.
//
// With enable high, each valid_in sample advances a modulo-N counter; the
// sample that finds the counter at zero is registered to dout with
// valid_out high for one cycle. With enable low nothing passes and the
// counter restarts. The published design keeps one sample in eight and
// describes the enable and valid flags; the counter phase (first sample
// kept) and the registered output are this design's choices.
// Latency: one clock.
module compressor
  import safetalk_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    enable,
  input  logic    valid_in,
  input  sample_t din,
  output logic    valid_out,
  output sample_t dout
);
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;
  logic [CW-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      valid_out <= 1'b0;
      dout      <= '0;
    end else begin
      valid_out <= 1'b0;
      if (!enable) begin
        phase <= '0;
      end else if (valid_in) begin
        phase <= (phase == CW'(N - 1)) ? '0 : phase + 1'b1;
        if (phase == '0) begin
          dout      <= din;
          valid_out <= 1'b1;
        end
      end
    end
  end

  initial assert (N >= 1) else $error("N must be at least 1");
endmodule
