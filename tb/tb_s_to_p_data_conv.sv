// Testbench for s_to_p_data_conv: 8 bits given LSB first on 8 consecutive
// clocks (valid high on the first) must appear as one byte with a one-cycle
// valid_out on the clock after the eighth bit; idle gaps (valid low) in
// WAIT_V or SEND must not take bits; back-to-back bytes from SEND work. The
// published ciphertext bytes 00001010 and 10011000 are among the inputs.
module tb_s_to_p_data_conv;
  import safetalk_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic valid = 0, din = 0, valid_out;
  sample_t dout;
  s_to_p_data_conv dut (.clk, .rst_n, .valid, .din, .dout, .valid_out);

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

  sample_t b;
  int gap;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      b = (n == 0) ? 8'b0000_1010 : (n == 1) ? 8'b1001_1000 : sample_t'($urandom);
      for (int i = 0; i < 8; i++) begin
        valid = (i == 0); din = b[i];
        @(negedge clk);
        if (i < 7) check(!valid_out, "no output before 8 bits");
      end
      valid = 0; din = $urandom_range(1);
      check(valid_out, $sformatf("valid_out after byte %0d", n));
      check(dout == b, $sformatf("byte %0d: %02x vs %02x", n, dout, b));
      gap = (n % 4 == 0) ? 0 : $urandom_range(3);
      repeat (gap) begin
        @(negedge clk);
        check(!valid_out && dout == b, "holds the byte, no new strobe");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
