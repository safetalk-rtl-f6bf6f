// UART receiver for the 11-bit frame of uart_txmit (start, 8 data bits LSB
// first, parity, stop).
//
// rx is synchronised by two flip-flops and looked at on each strobe of
// mclkx16_en (16 per bit). A low level starts a frame; 8 strobes later, in
// the middle of the start bit, it must still be low or the start is taken
// as a glitch. From there every 16th strobe samples the middle of a data,
// parity and stop bit. At the stop bit the byte goes into the receive
// holding register and rxrdy rises. parityerr (parity mismatch) and
// framingerr (stop bit low) describe that latest frame; overrun is set when
// a frame completes while rxrdy is still high (the unread byte is
// overwritten) and is cleared by a read. A high-to-low transition of read_n
// copies the holding register to dataout and clears rxrdy.
//
// Flags, strobes and the frame are as published; mid-bit sampling, the
// false-start check and when the flags clear are this design's choices.
module uart_rxcvr
  import safetalk_pkg::*;
#(
  parameter bit ODD_PARITY = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    mclkx16_en,
  input  logic    rx,
  input  logic    read_n,
  output sample_t dataout,
  output logic    rxrdy,
  output logic    parityerr,
  output logic    framingerr,
  output logic    overrun
);
  typedef enum logic [2:0] {IDLE, START, DATA, PARITY, STOP} state_t;

  state_t     state;
  logic [1:0] rx_sync;
  logic       rx_s;
  logic [3:0] sub;
  logic [2:0] nbit;
  sample_t    rsr, rhr;
  logic       par;
  logic       read_q, do_read;

  assign rx_s    = rx_sync[1];
  assign do_read = !read_n && read_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync    <= 2'b11;
      state      <= IDLE;
      sub        <= '0;
      nbit       <= '0;
      rsr        <= '0;
      rhr        <= '0;
      par        <= 1'b0;
      dataout    <= '0;
      rxrdy      <= 1'b0;
      parityerr  <= 1'b0;
      framingerr <= 1'b0;
      overrun    <= 1'b0;
      read_q     <= 1'b1;
    end else begin
      rx_sync <= {rx_sync[0], rx};
      read_q  <= read_n;

      if (do_read) begin
        dataout <= rhr;
        rxrdy   <= 1'b0;
        overrun <= 1'b0;
      end

      if (mclkx16_en) begin
        unique case (state)
          IDLE: if (!rx_s) begin
            state <= START;
            sub   <= '0;
          end
          START: begin
            sub <= sub + 1'b1;
            if (sub == 4'd7) begin
              sub   <= '0;
              nbit  <= '0;
              state <= rx_s ? IDLE : DATA;
            end
          end
          DATA: begin
            sub <= sub + 1'b1;
            if (sub == 4'd15) begin
              rsr  <= {rx_s, rsr[7:1]};
              nbit <= nbit + 1'b1;
              if (nbit == 3'd7) state <= PARITY;
            end
          end
          PARITY: begin
            sub <= sub + 1'b1;
            if (sub == 4'd15) begin
              par   <= rx_s;
              state <= STOP;
            end
          end
          STOP: begin
            sub <= sub + 1'b1;
            if (sub == 4'd15) begin
              rhr        <= rsr;
              parityerr  <= (par != parity_bit(rsr, ODD_PARITY));
              framingerr <= !rx_s;
              rxrdy      <= 1'b1;
              if (rxrdy && !do_read) overrun <= 1'b1;
              state      <= IDLE;
            end
          end
          default: state <= IDLE;
        endcase
      end
    end
  end
endmodule
