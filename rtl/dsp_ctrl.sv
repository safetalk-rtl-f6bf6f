// DSP control: the flow controller between the encryptor, the two FIFOs,
// the UART and the decryptor. Every module is only told to act when its
// input is valid and its output has room, so no byte is lost between them.
//
// Send side
//   * enc_allow tells the encryptor whether one more byte fits in the
//     transmit FIFO, counting a byte still inside the encryptor. Each
//     encrypted byte (enc_valid) is written straight into the FIFO. With
//     FORCE_TX_LSB set the byte's least significant bit is forced to 1
//     before it is queued, the published workaround for a receiver that
//     lost frames whose first data bit was 0; it costs the LSB of the
//     decrypted sample.
//   * When the FIFO is not empty and the UART reports txrdy, the head word
//     is read (one cycle, rdreq_n low) and written to the UART (one cycle,
//     write_n low).
// Receive side
//   * When the UART reports rxrdy and the receive FIFO is not full, the byte
//     is read (read_n low) and written into the FIFO on the next cycle.
//   * When the receive FIFO is not empty and the decryptor is idle, the head
//     word is read and handed to the decryptor with a one-cycle dec_valid.
// After reset all three sequencers are idle and nothing moves until valid
// data arrives. The conditions (empty/txrdy, rxrdy, valid flags) are the
// published ones; the exact sequencing cycles are this design's choice.
// The data outputs (txf_data, uart_datain, rxf_data, dec_data) are wired
// straight from the matching inputs: this block only routes the bytes and
// generates the control strobes. The assertions at the end check the
// handshake rules; they are disabled during reset, which is the only
// non-asynchronous use of rst_n and what lint reports as a net used both
// synchronously and asynchronously.
module dsp_ctrl
  import safetalk_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter bit          FORCE_TX_LSB = 1'b1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // encryptor
  input  logic                            enc_valid,
  input  sample_t                         enc_data,
  input  logic                            enc_busy,
  output logic                            enc_allow,
  // transmit FIFO
  output logic                            txf_wrreq,
  output sample_t                         txf_data,
  output logic                            txf_rdreq_n,
  input  sample_t                         txf_q,
  input  logic                            txf_full,
  input  logic                            txf_empty,
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] txf_usedw,
  // UART
  output logic                            uart_write_n,
  output sample_t                         uart_datain,
  input  logic                            uart_txrdy,
  output logic                            uart_read_n,
  input  sample_t                         uart_dataout,
  input  logic                            uart_rxrdy,
  // receive FIFO
  output logic                            rxf_wrreq,
  output sample_t                         rxf_data,
  output logic                            rxf_rdreq_n,
  input  sample_t                         rxf_q,
  input  logic                            rxf_full,
  input  logic                            rxf_empty,
  // decryptor
  output logic                            dec_valid,
  output sample_t                         dec_data,
  input  logic                            dec_busy
);
  typedef enum logic [1:0] {T_IDLE, T_READ, T_WRITE} tx_state_t;
  typedef enum logic [1:0] {R_IDLE, R_READ, R_PUSH}  rx_state_t;
  typedef enum logic [1:0] {D_IDLE, D_READ, D_SEND}  dec_state_t;

  tx_state_t  tx_st;
  rx_state_t  rx_st;
  dec_state_t dec_st;

  // ---- send side -------------------------------------------------------
  assign enc_allow = (32'(txf_usedw) + 32'(enc_busy)) < FIFO_DEPTH;
  assign txf_wrreq = enc_valid;
  assign txf_data  = FORCE_TX_LSB ? {enc_data[7:1], 1'b1} : enc_data;

  assign txf_rdreq_n  = (tx_st != T_READ);
  assign uart_write_n = (tx_st != T_WRITE);
  assign uart_datain  = txf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx_st <= T_IDLE;
    else unique case (tx_st)
      T_IDLE:  if (!txf_empty && uart_txrdy) tx_st <= T_READ;
      T_READ:  tx_st <= T_WRITE;
      default: tx_st <= T_IDLE;
    endcase
  end

  // ---- receive side ----------------------------------------------------
  assign uart_read_n = (rx_st != R_READ);
  assign rxf_wrreq   = (rx_st == R_PUSH);
  assign rxf_data    = uart_dataout;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_st <= R_IDLE;
    else unique case (rx_st)
      R_IDLE:  if (uart_rxrdy && !rxf_full) rx_st <= R_READ;
      R_READ:  rx_st <= R_PUSH;
      default: rx_st <= R_IDLE;
    endcase
  end

  assign rxf_rdreq_n = (dec_st != D_READ);
  assign dec_valid   = (dec_st == D_SEND);
  assign dec_data    = rxf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dec_st <= D_IDLE;
    else unique case (dec_st)
      D_IDLE:  if (!rxf_empty && !dec_busy) dec_st <= D_READ;
      D_READ:  dec_st <= D_SEND;
      default: dec_st <= D_IDLE;
    endcase
  end

  // ---- handshake rules -------------------------------------------------
  a_no_tx_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(txf_wrreq && txf_full)) else $error("write into a full transmit FIFO");
  a_no_rx_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(rxf_wrreq && rxf_full)) else $error("write into a full receive FIFO");
  a_uart_ready: assert property (@(posedge clk) disable iff (!rst_n)
    !uart_write_n |-> uart_txrdy) else $error("UART written while not ready");
  a_dec_idle: assert property (@(posedge clk) disable iff (!rst_n)
    dec_valid |-> !dec_busy) else $error("decryptor fed while busy");
endmodule
