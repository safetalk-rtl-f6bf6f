// Testbench for uart_txmit with the 16x strobe at clk/4 (as in the
// published transmitter test). The published bytes EF, A5, 55, 00 must go
// out as the listed frames (start, data LSB first, even parity, stop), and
// 200 random bytes as frames built independently here; each bit lasts 16
// strobes, tx idles high and txrdy is low from the write to the end of the
// stop bit.
module tb_uart_txmit;
  import safetalk_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic en = 0, write_n = 1, tx, txrdy;
  sample_t datain = '0;
  int cc = 0;
  always @(posedge clk) begin cc++; en <= (cc % 4 == 3); end

  uart_txmit #(.ODD_PARITY(1'b0)) dut (.clk, .rst_n, .mclkx16_en(en), .write_n, .datain, .tx, .txrdy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame in the order of transmission, as a string of 0/1
  task automatic send_and_check(input sample_t b, input string frame);
    int t;
    wait (txrdy); @(negedge clk);
    datain = b; write_n = 0; @(negedge clk); write_n = 1;
    check(!txrdy, "txrdy low after write");
    t = 0;
    while (tx && t < 200) begin @(negedge clk); t++; end
    repeat (32) @(negedge clk);          // middle of the start bit
    for (int i = 0; i < 11; i++) begin
      check(tx == (frame[i] == "1"), $sformatf("byte %02x bit %0d", b, i));
      if (i < 10) check(!txrdy, "busy during frame");
      repeat (64) @(negedge clk);
    end
    check(tx && txrdy, "idle high and ready after the stop bit");
  endtask

  function automatic string make_frame(input sample_t b);
    string s = "0";
    int ones = 0;
    for (int i = 0; i < 8; i++) begin s = {s, b[i] ? "1" : "0"}; ones += b[i]; end
    s = {s, (ones % 2) ? "1" : "0", "1"};
    return s;
  endfunction

  sample_t b;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    check(tx && txrdy, "idle after reset");
    send_and_check(8'hEF, "01111011111");
    send_and_check(8'hA5, "01010010101");
    send_and_check(8'h55, "01010101001");
    send_and_check(8'h00, "00000000001");
    for (int i = 0; i < 200; i++) begin
      b = $urandom;
      send_and_check(b, make_frame(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
