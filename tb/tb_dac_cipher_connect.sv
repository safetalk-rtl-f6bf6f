// Testbench for dac_cipher_connect (decryptor). First the published
// decryption/DAC bench vectors: after a reset, F5 then AB decrypt to FF and
// 33; after another reset A0, 03 give AA, 9B; after a third 0A, D8 give
// 00, 40. Then 300 random bytes, with comp_en switched on for the second
// half, must decrypt to byte ^ key byte n (independent model), 10 clocks
// after valid_in (11 with the decompressor), with busy high meanwhile.
module tb_dac_cipher_connect;
  import safetalk_pkg::*;
  import keystream_model_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic comp_en = 0, valid_in = 0, valid_out, busy;
  sample_t din = '0, dout;
  dac_cipher_connect dut (.clk, .rst_n, .comp_en, .valid_in, .din, .valid_out, .dout, .busy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input sample_t b, input sample_t exp, input int lat);
    int t;
    din = b; valid_in = 1;
    @(negedge clk);
    valid_in = 0; din = $urandom;
    t = 1;
    while (!valid_out && t < 40) begin
      check(busy, "busy while decrypting");
      @(negedge clk); t++;
    end
    check(valid_out && dout == exp, $sformatf("decrypt %02x -> %02x (want %02x)", b, dout, exp));
    check(t == lat, $sformatf("latency %0d (want %0d)", t, lat));
    @(negedge clk);
    check(!busy, "idle after the byte");
  endtask

  task automatic do_reset();
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
  endtask

  sample_t kb[300];
  sample_t b;
  initial begin
    for (int i = 0; i < 300; i++) kb[i] = key_byte(i);
    repeat (2) @(posedge clk);
    do_reset();
    send(8'b11110101, 8'b11111111, 10);
    send(8'b10101011, 8'b00110011, 10);
    do_reset();
    send(8'b10100000, 8'b10101010, 10);
    send(8'b00000011, 8'b10011011, 10);
    do_reset();
    send(8'b00001010, 8'b00000000, 10);
    send(8'b11011000, 8'b01000000, 10);
    do_reset();
    for (int i = 0; i < 300; i++) begin
      comp_en = (i >= 150);
      b = $urandom;
      send(b, b ^ kb[i], comp_en ? 11 : 10);
      repeat ($urandom_range(3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
