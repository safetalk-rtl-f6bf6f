// Testbench for key_generator: 3000 keystream bits, with random pauses of
// the enable, must equal an independent model of the Geffe combination of
// the three LFSRs; the first 16 bits must give the published keystream
// bytes 0x0A and 0x98 (LSB first), which encrypt an all-zero plaintext to
// 00001010 and 10011000.
module tb_key_generator;
  import keystream_model_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  logic key_bit;

  key_generator dut (.clk, .rst_n, .en, .key_bit);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ks[$];
  byte unsigned b0, b1;
  initial begin
    keystream(3000, ks);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      while ($urandom_range(3) == 0) begin
        en = 0; @(negedge clk);
        check(key_bit == ks[i], "key bit held while en low");
      end
      check(key_bit == ks[i], $sformatf("key bit %0d", i));
      if (i < 8) b0[i] = key_bit; else if (i < 16) b1[i-8] = key_bit;
      en = 1; @(negedge clk); en = 0;
    end
    check(b0 == 8'h0A, $sformatf("first key byte %02x", b0));
    check(b1 == 8'h98, $sformatf("second key byte %02x", b1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
