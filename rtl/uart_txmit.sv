// UART transmitter.
//
// Sends each byte as an 11-bit frame: a low start bit, 8 data bits least
// significant first, a parity bit (even unless ODD_PARITY) and a high stop
// bit; tx idles high. Bit timing comes from mclkx16_en, a one-cycle strobe
// at 16 times the baud rate: every bit lasts 16 strobes.
//
// Handshake: while txrdy is high, a high-to-low transition of write_n
// (seen on clk) latches datain and starts the frame; txrdy falls on the
// next clock and rises again after the stop bit has been sent. The frame
// format, the divide-by-16 and the active-low write strobe are as
// published; running on the system clock with a baud-rate strobe instead
// of a separate mclkx16 clock, and the single buffer stage, are this
// design's choices.
module uart_txmit
  import safetalk_pkg::*;
#(
  parameter bit ODD_PARITY = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    mclkx16_en,
  input  logic    write_n,
  input  sample_t datain,
  output logic    tx,
  output logic    txrdy
);
  logic [UART_FRAME_BITS-1:0] frame;
  logic [3:0]                 sub;
  logic [3:0]                 left;
  logic                       write_q;
  logic                       start;

  assign start = txrdy && !write_n && write_q;
  assign tx    = frame[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame   <= '1;
      sub     <= '0;
      left    <= '0;
      txrdy   <= 1'b1;
      write_q <= 1'b1;
    end else begin
      write_q <= write_n;
      if (start) begin
        frame <= {1'b1, parity_bit(datain, ODD_PARITY), datain, 1'b0};
        sub   <= '0;
        left  <= 4'(UART_FRAME_BITS);
        txrdy <= 1'b0;
      end else if (!txrdy && mclkx16_en) begin
        sub <= sub + 1'b1;
        if (sub == 4'(UART_OVERSAMPLE - 1)) begin
          frame <= {1'b1, frame[UART_FRAME_BITS-1:1]};
          left  <= left - 1'b1;
          if (left == 4'd1) txrdy <= 1'b1;
        end
      end
    end
  end
endmodule
