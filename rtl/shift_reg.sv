// 8-bit parallel-to-serial converter in front of the stream cipher.
//
// It idles until valid_in is high, then stores din. For the next 8 clock
// cycles it presents the stored byte one bit at a time, least significant
// bit first, on dout with valid_out high, and then drops valid_out again.
// busy is high from the load until the last bit has been shown. This
// follows the published four-step description; a valid_in that arrives
// while busy is ignored (the source must wait for busy to fall), which is
// this design's choice. Timing: din loaded at edge t, bit k on dout during
// cycle t+1+k.
module shift_reg
  import safetalk_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    valid_in,
  input  sample_t din,
  output logic    valid_out,
  output logic    dout,
  output logic    busy
);
  sample_t    sr;
  logic [3:0] left;   // bits still to show

  assign busy      = (left != 0);
  assign valid_out = busy;
  assign dout      = sr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      left <= '0;
    end else if (!busy) begin
      if (valid_in) begin
        sr   <= din;
        left <= 4'd8;
      end
    end else begin
      sr   <= {1'b0, sr[7:1]};
      left <= left - 1'b1;
    end
  end
endmodule
