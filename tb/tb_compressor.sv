// Testbench for compressor (N = 8): with enable high, of every 8 valid
// samples exactly the first passes, one clock later, with its value; with
// enable low nothing passes and the count restarts.
module tb_compressor;
  import safetalk_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic enable = 0, valid_in = 0, valid_out;
  sample_t din = '0, dout;
  compressor #(.N(8)) dut (.clk, .rst_n, .enable, .valid_in, .din, .valid_out, .dout);

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

  int phase = 0, npass = 0;
  bit exp_v;
  sample_t exp_d;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      if (i % 500 == 0) enable = !enable;
      valid_in = ($urandom_range(2) != 0);
      din = $urandom;
      exp_v = 0;
      if (!enable) phase = 0;
      else if (valid_in) begin
        exp_v = (phase == 0); exp_d = din;
        phase = (phase + 1) % 8;
      end
      @(negedge clk);
      check(valid_out == exp_v, $sformatf("valid_out step %0d", i));
      if (exp_v) begin check(dout == exp_d, "kept sample value"); npass++; end
    end
    check(npass > 100, "samples passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
