// Testbench for uart_rxcvr with the 16x strobe at clk/4 (64 clocks a bit).
// The published serial frames for EF, A5, 55 and 00 and 200 random frames
// must be received with rxrdy, read out with read_n and show no errors. A
// frame with a wrong parity bit must raise parityerr, one with a low stop
// bit framingerr, two frames without a read overrun, and a short low
// glitch on rx must not start a frame.
module tb_uart_rxcvr;
  import safetalk_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic en = 0, rx = 1, read_n = 1, rxrdy, parityerr, framingerr, overrun;
  sample_t dataout;
  int cc = 0;
  always @(posedge clk) begin cc++; en <= (cc % 4 == 1); end

  uart_rxcvr #(.ODD_PARITY(1'b0)) dut (.clk, .rst_n, .mclkx16_en(en), .rx, .read_n, .dataout,
    .rxrdy, .parityerr, .framingerr, .overrun);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input string frame);
    for (int i = 0; i < 11; i++) begin
      rx = (frame[i] == "1");
      repeat (64) @(negedge clk);
    end
    rx = 1;
    repeat (8) @(negedge clk);
  endtask

  task automatic read_out(output sample_t d);
    read_n = 0; @(negedge clk); read_n = 1;
    d = dataout;
    @(negedge clk);
  endtask

  function automatic string make_frame(input sample_t b, input bit bad_par, input bit bad_stop);
    string s = "0";
    int ones = 0;
    for (int i = 0; i < 8; i++) begin s = {s, b[i] ? "1" : "0"}; ones += b[i]; end
    s = {s, ((ones % 2) ^ bad_par) ? "1" : "0", bad_stop ? "0" : "1"};
    return s;
  endfunction

  task automatic expect_byte(input sample_t b, input bit pe, input bit fe, input bit ov);
    sample_t d;
    check(rxrdy, $sformatf("rxrdy for %02x", b));
    check(parityerr == pe, $sformatf("parityerr for %02x", b));
    check(framingerr == fe, $sformatf("framingerr for %02x", b));
    check(overrun == ov, $sformatf("overrun for %02x", b));
    read_out(d);
    check(d == b, $sformatf("received %02x want %02x", d, b));
    check(!rxrdy && !overrun, "rxrdy and overrun clear after read");
  endtask

  sample_t b;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    drive("01111011111"); expect_byte(8'hEF, 0, 0, 0);
    drive("01010010101"); expect_byte(8'hA5, 0, 0, 0);
    drive("01010101001"); expect_byte(8'h55, 0, 0, 0);
    drive("00000000001"); expect_byte(8'h00, 0, 0, 0);
    for (int i = 0; i < 200; i++) begin
      b = $urandom;
      drive(make_frame(b, 0, 0)); expect_byte(b, 0, 0, 0);
    end
    drive(make_frame(8'h3C, 1, 0)); expect_byte(8'h3C, 1, 0, 0);
    drive(make_frame(8'hC3, 0, 1)); expect_byte(8'hC3, 0, 1, 0);
    repeat (100) @(negedge clk);     // let the line idle after the bad stop
    drive(make_frame(8'h11, 0, 0));
    drive(make_frame(8'h22, 0, 0)); expect_byte(8'h22, 0, 0, 1);
    // glitch shorter than half a bit
    rx = 0; repeat (12) @(negedge clk); rx = 1;
    repeat (800) @(negedge clk);
    check(!rxrdy, "glitch does not produce a byte");
    drive(make_frame(8'h5A, 0, 0)); expect_byte(8'h5A, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
