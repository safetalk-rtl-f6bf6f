// Testbench for input_reader, following the published test cases: (1) eoc
// always high, the machine cycles through all five states; (2) eoc low
// during conversion, the machine waits in IN_CONV; (3) eoc never rises,
// no sample is ever produced; (4) reset returns to SAMPLE_CONV. Checks soc
// lasts one slow-clock period, sample is low from start to read, hold_out
// takes the ADC bits, valid_out pulses once per cycle, and with eoc high a
// full cycle takes 5 slow-clock periods.
module tb_input_reader;
  import safetalk_pkg::*;
  localparam int DIV = 3;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic slow, rt, ft;
  sample_t bits;
  logic eoc, sample, soc, valid_out;
  sample_t hold_out;

  clock_divider #(.DIVISOR(DIV)) u_div (.clk, .rst_n, .slow_clock(slow), .rise_tick(rt), .fall_tick(ft));
  input_reader dut (.clk, .rst_n, .fall_tick(ft), .bits, .eoc, .sample, .soc, .hold_out, .valid_out);

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

  int n = 0, soc_len = 0, last_valid = -1, valids = 0;
  logic soc_q;
  initial soc_q = 0;
  always @(posedge clk) if (rst_n) begin
    n++;
    soc_q <= soc;
    if (soc && rst_n) soc_len++;
    if (!soc && soc_q) begin
      check(soc_len == 2 * DIV, $sformatf("soc high for one slow-clock period (%0d)", soc_len));
      soc_len = 0;
    end
    if (soc) check(!sample, "sample low (hold) while soc high");
    if (valid_out) begin
      valids++;
      check(hold_out == bits, "hold_out holds the ADC bits");
      check(sample, "sample back high when data is read");
      last_valid = n;
    end
  end

  int v0, t0;
  initial begin
    bits = 8'h3C; eoc = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // test case 1: eoc always high
    wait (valids == 1); t0 = n; v0 = valids;
    wait (valids == 3);
    check(n - t0 == 2 * 5 * 2 * DIV, "5 slow periods per sample with eoc high");
    // test case 2: eoc low in the middle of a conversion
    @(posedge soc); eoc = 1'b0; bits = 8'hA7;
    v0 = valids;
    repeat (40 * DIV) @(posedge clk);
    check(valids == v0, "no sample while eoc low");
    check(int'(dut.state) == 2, "waits in IN_CONV while eoc low");
    eoc = 1'b1;
    wait (valids == v0 + 1);
    @(negedge clk);
    check(hold_out == 8'hA7, "new sample read after eoc rises");
    // test case 3: eoc never rises
    @(posedge soc); eoc = 1'b0; v0 = valids;
    repeat (200 * DIV) @(posedge clk);
    check(valids == v0, "no sample when eoc stays low");
    check(!soc && !sample, "holding with soc low while converting");
    // test case 4: reset
    rst_n = 0; @(posedge clk); #1;
    check(int'(dut.state) == 0 && sample && !soc, "reset returns to SAMPLE_CONV");
    rst_n = 1; eoc = 1'b1; bits = 8'h5A;
    wait (valids == v0 + 1);
    @(negedge clk);
    check(hold_out == 8'h5A, "sampling resumes after reset");
    check(checks > 20, "enough checks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
