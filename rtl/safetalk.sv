// SafeTalk: one end of a secure voice link on a single FPGA.
//
// Send path: an external ADC0809 with sample-and-hold digitises the
// microphone signal; adc_cipher_connect runs the converter, optionally
// keeps one sample in COMP_N (comp_en) and encrypts each byte with an
// LFSR-based Geffe stream cipher; dsp_ctrl queues the ciphertext in the
// transmit FIFO and hands it to the UART, which sends 11-bit frames
// (start, 8 data LSB first, even parity, stop) on tx, to a modem or
// directly to the other end.
// Receive path: the UART receives frames on rx; dsp_ctrl moves each byte
// into the receive FIFO and from there into dac_cipher_connect, which
// decrypts it with the same keystream; the plain byte is loaded into the
// data register that drives the external DAC (dataout) and holds it steady
// between samples.
//
// Clocking: everything runs on clk (25.175 MHz on the original board). The
// ADC gets slow_clock = clk/(2*ADC_DIVISOR) (about 840 kHz). The UART's 16x
// baud-rate strobe comes every 2*UART_DIVISOR clocks (about 1.4 MHz, i.e.
// about 87.4 kbit/s). Where the original ran the UART and FIFOs from a
// separate divided clock, this design uses strobes on one clock.
// Beside the link sits dsctest, the DAC test-pattern counter, with its own
// output.
//
// Status: rxrdy-related errors of the last frame (parityerr, framingerr,
// overrun) come out as in the published block diagram; tx_drop pulses when
// a sample is discarded because the transmit FIFO is full (an added
// status output). Both ends of a link must be reset together: the keystream
// position is the number of bytes since reset.
// Lint sees rst_n used both asynchronously and synchronously here because
// the assertions inside dsp_ctrl are disabled while it is low.
module safetalk
  import safetalk_pkg::*;
#(
  parameter int unsigned ADC_DIVISOR  = 15,
  parameter int unsigned UART_DIVISOR = 9,
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned COMP_N       = 8,
  parameter bit          ODD_PARITY   = 1'b0,
  parameter bit          FORCE_TX_LSB = 1'b1,
  parameter int unsigned DSCTEST_DIV  = 10000
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    comp_en,       // 1: compression / decompression on
  // ADC0809 and SMP11
  input  sample_t adc_bits,
  input  logic    adc_eoc,
  output logic    adc_soc,
  output logic    adc_sample,
  output logic    adc_clk,
  // serial line
  output logic    tx,
  input  logic    rx,
  // DAC0806
  output sample_t dataout,
  // status
  output logic    parityerr,
  output logic    framingerr,
  output logic    overrun,
  output logic    tx_drop,
  // DAC test pattern
  output sample_t dsctest_out
);
  localparam int unsigned UW = $clog2(FIFO_DEPTH + 1);

  logic          fifo_sclr;
  logic          enc_valid, enc_busy, enc_allow;
  sample_t       enc_data;
  logic          txf_wrreq, txf_rdreq_n, txf_full, txf_empty;
  sample_t       txf_data, txf_q;
  logic [UW-1:0] txf_usedw, rxf_usedw;
  logic          rxf_wrreq, rxf_rdreq_n, rxf_full, rxf_empty;
  sample_t       rxf_data, rxf_q;
  logic          baud16, baud_clk, baud_fall;
  logic          uart_write_n, uart_read_n, uart_txrdy, uart_rxrdy;
  sample_t       uart_datain, uart_dataout;
  logic          dec_valid, dec_busy, dec_out_valid;
  sample_t       dec_data, dec_out;
  logic          dsctest_up;

  // FIFOs are cleared synchronously: sclr is set by reset and released on
  // the first clock edge after it
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fifo_sclr <= 1'b1;
    else        fifo_sclr <= 1'b0;
  end

  adc_cipher_connect #(.ADC_DIVISOR(ADC_DIVISOR), .COMP_N(COMP_N)) u_encryptor (
    .clk, .rst_n, .comp_en, .allow(enc_allow),
    .adc_bits, .adc_eoc, .adc_soc, .adc_sample, .adc_clk,
    .valid_out(enc_valid), .dout(enc_data), .busy(enc_busy), .dropped(tx_drop)
  );

  fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(8)) u_txfifo (
    .clock(clk), .sclr(fifo_sclr), .data(txf_data), .wrreq(txf_wrreq),
    .rdreq_n(txf_rdreq_n), .q(txf_q), .full(txf_full), .empty(txf_empty),
    .usedw(txf_usedw)
  );

  clock_divider #(.DIVISOR(UART_DIVISOR)) u_baud_divider (
    .clk, .rst_n, .slow_clock(baud_clk), .rise_tick(baud16), .fall_tick(baud_fall)
  );

  uart #(.ODD_PARITY(ODD_PARITY)) u_uart (
    .clk, .rst_n, .mclkx16_en(baud16),
    .write_n(uart_write_n), .datain(uart_datain), .txrdy(uart_txrdy), .tx,
    .rx, .read_n(uart_read_n), .dataout(uart_dataout), .rxrdy(uart_rxrdy),
    .parityerr, .framingerr, .overrun
  );

  fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(8)) u_rxfifo (
    .clock(clk), .sclr(fifo_sclr), .data(rxf_data), .wrreq(rxf_wrreq),
    .rdreq_n(rxf_rdreq_n), .q(rxf_q), .full(rxf_full), .empty(rxf_empty),
    .usedw(rxf_usedw)
  );

  dac_cipher_connect u_decryptor (
    .clk, .rst_n, .comp_en, .valid_in(dec_valid), .din(dec_data),
    .valid_out(dec_out_valid), .dout(dec_out), .busy(dec_busy)
  );

  dsp_ctrl #(.FIFO_DEPTH(FIFO_DEPTH), .FORCE_TX_LSB(FORCE_TX_LSB)) u_dsp_ctrl (
    .clk, .rst_n,
    .enc_valid, .enc_data, .enc_busy, .enc_allow,
    .txf_wrreq, .txf_data, .txf_rdreq_n, .txf_q, .txf_full, .txf_empty, .txf_usedw,
    .uart_write_n, .uart_datain, .uart_txrdy, .uart_read_n, .uart_dataout, .uart_rxrdy,
    .rxf_wrreq, .rxf_data, .rxf_rdreq_n, .rxf_q, .rxf_full, .rxf_empty,
    .dec_valid, .dec_data, .dec_busy
  );

  // data register in front of the DAC
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             dataout <= '0;
    else if (dec_out_valid) dataout <= dec_out;
  end

  dsctest #(.DIV(DSCTEST_DIV)) u_dsctest (
    .clk, .rst_n, .count(dsctest_out), .up(dsctest_up)
  );
endmodule
