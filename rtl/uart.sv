// UART: the transmitter and receiver side by side, with the I/O list of
// the published module (mclkx16, reset, parityerr, framingerr, overrun,
// rxrdy, txrdy, read, write, datain, dataout, tx, rx).
//
// Both halves share the 16x baud-rate strobe mclkx16_en and the parity
// setting; see uart_txmit and uart_rxcvr for framing and handshakes. read
// and write are active-low strobes (read_n, write_n). The strobe instead of
// a separate clock and the active-low asynchronous reset are this design's
// choices.
module uart
  import safetalk_pkg::*;
#(
  parameter bit ODD_PARITY = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    mclkx16_en,
  // transmitter
  input  logic    write_n,
  input  sample_t datain,
  output logic    txrdy,
  output logic    tx,
  // receiver
  input  logic    rx,
  input  logic    read_n,
  output sample_t dataout,
  output logic    rxrdy,
  output logic    parityerr,
  output logic    framingerr,
  output logic    overrun
);
  uart_txmit #(.ODD_PARITY(ODD_PARITY)) u_txmit (
    .clk, .rst_n, .mclkx16_en, .write_n, .datain, .tx, .txrdy
  );

  uart_rxcvr #(.ODD_PARITY(ODD_PARITY)) u_rxcvr (
    .clk, .rst_n, .mclkx16_en, .rx, .read_n, .dataout, .rxrdy,
    .parityerr, .framingerr, .overrun
  );
endmodule
