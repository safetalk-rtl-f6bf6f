// Testbench for clock_divider: with DIVISOR = 15 (the ADC clock) and
// DIVISOR = 1 (slow clock at half the input rate), slow_clock must have a
// period of exactly 2*DIVISOR clocks and 50% duty cycle, and the tick
// strobes must come in the clock cycle just before each slow_clock edge.
module tb_clock_divider;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic sc15, r15, f15, sc1, r1, f1;
  clock_divider #(.DIVISOR(15)) dut15 (.clk, .rst_n, .slow_clock(sc15), .rise_tick(r15), .fall_tick(f15));
  clock_divider #(.DIVISOR(1))  dut1  (.clk, .rst_n, .slow_clock(sc1),  .rise_tick(r1),  .fall_tick(f1));

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

  // independent period measurement
  int unsigned n = 0, last_rise15 = 0, last_fall15 = 0, rises15 = 0;
  int unsigned last_rise1 = 0, rises1 = 0;
  logic sc15_q, sc1_q, r15_q, f15_q, r1_q, f1_q;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2000) @(posedge clk);
    check(rises15 > 50, "DIVISOR=15 produced slow clock edges");
    check(rises1 > 500, "DIVISOR=1 produced slow clock edges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    n++;
    sc15_q <= sc15; sc1_q <= sc1;
    r15_q <= r15; f15_q <= f15; r1_q <= r1; f1_q <= f1;
    if (rst_n && n > 5) begin
      // a tick in the previous cycle must match the edge seen now
      check((sc15 && !sc15_q) == r15_q, "rise_tick precedes rise (15)");
      check((!sc15 && sc15_q) == f15_q, "fall_tick precedes fall (15)");
      check((sc1 && !sc1_q) == r1_q, "rise_tick precedes rise (1)");
      check((!sc1 && sc1_q) == f1_q, "fall_tick precedes fall (1)");
      if (sc15 && !sc15_q) begin
        if (rises15 > 0) check(n - last_rise15 == 30, "period 30 clocks");
        if (last_fall15 != 0) check(n - last_fall15 == 15, "low half 15 clocks");
        last_rise15 = n; rises15++;
      end
      if (!sc15 && sc15_q) begin
        check(n - last_rise15 == 15, "high half 15 clocks");
        last_fall15 = n;
      end
      if (sc1 && !sc1_q) begin
        if (rises1 > 0) check(n - last_rise1 == 2, "period 2 clocks");
        last_rise1 = n; rises1++;
      end
    end
  end
endmodule
