// Testbench for shift_reg: each loaded byte must appear LSB first on dout
// during the 8 cycles after the load, with valid_out high for exactly those
// 8 cycles; a valid_in while busy must be ignored.
module tb_shift_reg;
  import safetalk_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic valid_in = 0, valid_out, dout, busy;
  sample_t din = '0;
  shift_reg dut (.clk, .rst_n, .valid_in, .din, .valid_out, .dout, .busy);

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
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!valid_out && !busy, "idle after reset");
    for (int n = 0; n < 300; n++) begin
      b = (n == 0) ? 8'hA5 : sample_t'($urandom);
      din = b; valid_in = 1;
      @(negedge clk);
      valid_in = (n % 3 == 0);          // a second valid while busy is ignored
      din = ~b;
      for (int i = 0; i < 8; i++) begin
        check(valid_out && busy, "valid for 8 cycles");
        check(dout == b[i], $sformatf("byte %0d bit %0d", n, i));
        @(negedge clk);
        valid_in = 0;
      end
      check(!valid_out && !busy, "valid drops after 8 bits");
      repeat ($urandom_range(2)) begin
        @(negedge clk);
        check(!valid_out, "stays idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
