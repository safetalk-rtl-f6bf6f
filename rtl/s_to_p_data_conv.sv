// Serial-to-parallel converter behind the stream cipher (Moore machine).
//
// States WAIT_V, READ1..READ7 and SEND, as in the published state diagram.
// From WAIT_V or SEND a clock edge with valid high takes the first bit and
// moves to READ1; each READk state takes the next bit on the following edge
// without looking at valid (the 8 bits of a byte come on 8 consecutive
// clocks); READ7 takes the eighth bit and moves to SEND. Bits arrive least
// significant first. On entering SEND the byte appears on dout with
// valid_out high for that one cycle; dout then holds the byte until the
// next one is complete. Holding dout (rather than driving zero) and the
// single-cycle valid_out are this design's choices. Latency: valid_out is
// high the cycle after the edge that took the eighth bit.
module s_to_p_data_conv
  import safetalk_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    valid,
  input  logic    din,
  output sample_t dout,
  output logic    valid_out
);
  typedef enum logic [3:0] {
    WAIT_V, READ1, READ2, READ3, READ4, READ5, READ6, READ7, SEND
  } state_t;

  state_t  state;
  sample_t sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= WAIT_V;
      sr        <= '0;
      dout      <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      unique case (state)
        WAIT_V, SEND: if (valid) begin
          sr    <= {din, sr[7:1]};
          state <= READ1;
        end
        READ7: begin
          dout      <= {din, sr[7:1]};
          valid_out <= 1'b1;
          state     <= SEND;
        end
        default: begin                      // READ1..READ6
          sr    <= {din, sr[7:1]};
          state <= state_t'(state + 1'b1);
        end
      endcase
    end
  end
endmodule
