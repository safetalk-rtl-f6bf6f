// Testbench for dsp_ctrl with the real FIFOs and UART, the UART looped back
// (tx to rx) and a simple stand-in for the decryptor (busy for a random
// number of cycles per byte). Bytes offered as encryptor output arrive at
// the decryptor input in order, with the LSB forced to 1. Bursts fill the
// transmit FIFO, so enc_allow must fall; the controller's assertions check
// that no FIFO is written while full and the UART only while ready.
module tb_dsp_ctrl;
  import safetalk_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic en = 0;
  int cc = 0;
  always @(posedge clk) begin cc++; en <= (cc % 2 == 0); end

  logic enc_valid = 0, enc_busy = 0, enc_allow;
  sample_t enc_data = '0;
  logic txf_wrreq, txf_rdreq_n, txf_full, txf_empty, rxf_wrreq, rxf_rdreq_n, rxf_full, rxf_empty;
  sample_t txf_data, txf_q, rxf_data, rxf_q;
  logic [4:0] txf_usedw, rxf_usedw;
  logic uart_write_n, uart_read_n, uart_txrdy, uart_rxrdy, tx, pe, fe, ov;
  sample_t uart_datain, uart_dataout, dec_data;
  logic dec_valid, dec_busy = 0;
  logic sclr;
  assign sclr = !rst_n;

  dsp_ctrl #(.FIFO_DEPTH(16), .FORCE_TX_LSB(1'b1)) dut (.clk, .rst_n,
    .enc_valid, .enc_data, .enc_busy, .enc_allow,
    .txf_wrreq, .txf_data, .txf_rdreq_n, .txf_q, .txf_full, .txf_empty, .txf_usedw,
    .uart_write_n, .uart_datain, .uart_txrdy, .uart_read_n, .uart_dataout, .uart_rxrdy,
    .rxf_wrreq, .rxf_data, .rxf_rdreq_n, .rxf_q, .rxf_full, .rxf_empty,
    .dec_valid, .dec_data, .dec_busy);
  fifo #(.DEPTH(16)) txf (.clock(clk), .sclr, .data(txf_data), .wrreq(txf_wrreq), .rdreq_n(txf_rdreq_n),
    .q(txf_q), .full(txf_full), .empty(txf_empty), .usedw(txf_usedw));
  fifo #(.DEPTH(16)) rxf (.clock(clk), .sclr, .data(rxf_data), .wrreq(rxf_wrreq), .rdreq_n(rxf_rdreq_n),
    .q(rxf_q), .full(rxf_full), .empty(rxf_empty), .usedw(rxf_usedw));
  uart u_uart (.clk, .rst_n, .mclkx16_en(en), .write_n(uart_write_n), .datain(uart_datain),
    .txrdy(uart_txrdy), .tx, .rx(tx), .read_n(uart_read_n), .dataout(uart_dataout),
    .rxrdy(uart_rxrdy), .parityerr(pe), .framingerr(fe), .overrun(ov));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decryptor stand-in
  sample_t expq[$];
  int nrx = 0, busy_cnt = 0, allow_low = 0, max_used = 0;
  always @(posedge clk) if (rst_n) begin
    if (dec_valid) begin
      check(!dec_busy, "decryptor fed only when idle");
      check(expq.size() > 0 && dec_data == expq[0], $sformatf("byte %0d in order", nrx));
      if (expq.size() > 0) void'(expq.pop_front());
      nrx++;
      dec_busy <= 1; busy_cnt = 5 + $urandom_range(20);
    end else if (dec_busy) begin
      busy_cnt--;
      if (busy_cnt == 0) dec_busy <= 0;
    end
    check(!(pe || fe || ov), "no line errors");
    if (!enc_allow) allow_low++;
    if (txf_usedw > max_used) max_used = txf_usedw;
  end

  sample_t b;
  int sent = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      // bursts of back-to-back offers, then pauses
      while (!enc_allow) @(negedge clk);
      b = $urandom;
      enc_valid = 1; enc_data = b; expq.push_back({b[7:1], 1'b1}); sent++;
      @(negedge clk);
      enc_valid = 0;
      if (i % 40 == 39) repeat (6000) @(negedge clk);
      else repeat ($urandom_range(12)) @(negedge clk);
    end
    wait (nrx == sent);
    repeat (100) @(negedge clk);
    check(expq.size() == 0, "all bytes delivered");
    check(allow_low > 0, "enc_allow fell when the FIFO filled");
    check(max_used >= 15, $sformatf("transmit FIFO filled (max %0d)", max_used));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
