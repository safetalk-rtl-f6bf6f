// Testbench for decompressor: with enable high each valid sample is held on
// dout from the next clock until the next valid sample, with a one-cycle
// valid_out; with enable low dout is frozen.
module tb_decompressor;
  import safetalk_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic enable = 0, valid_in = 0, valid_out;
  sample_t din = '0, dout;
  decompressor dut (.clk, .rst_n, .enable, .valid_in, .din, .valid_out, .dout);

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

  sample_t held = '0;
  bit exp_v;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      if (i % 400 == 0) enable = !enable;
      valid_in = ($urandom_range(7) == 0);
      din = $urandom;
      exp_v = enable && valid_in;
      if (exp_v) held = din;
      @(negedge clk);
      check(valid_out == exp_v, "valid_out");
      check(dout == held, $sformatf("held value step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
