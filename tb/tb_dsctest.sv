// Testbench for dsctest with DIV = 3: the count must step every 3 clocks,
// rise 0..255, fall 255..0 and rise again, tracked by a reference counter.
module tb_dsctest;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;
  logic [7:0] count;
  logic up;
  dsctest #(.DIV(3)) dut (.clk, .rst_n, .count, .up);

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

  int ref_c = 0, dir = 1, peaks = 0, valleys = 0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(count == 0 && up, "starts at 0 counting up");
    while (count == 0) @(negedge clk);       // first step
    ref_c = 1;
    for (int s = 0; s < 1200; s++) begin
      for (int k = 0; k < 3; k++) begin
        check(count == ref_c, $sformatf("count %0d want %0d", count, ref_c));
        @(negedge clk);
      end
      if (dir == 1 && ref_c == 255) begin dir = -1; peaks++; end
      else if (dir == -1 && ref_c == 0) begin dir = 1; valleys++; end
      ref_c += dir;
    end
    check(peaks >= 2 && valleys >= 2, "full up and down sweeps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
