// Testbench for lfsr: the three registers of the keystream generator must
// step through the published hand-checked sequences (first 18 states after
// the key) and keep matching an independent model for 2000 more steps;
// en low must hold the state.
module tb_lfsr;
  import safetalk_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic o8, o11, o13;
  logic [7:0]  s8;
  logic [10:0] s11;
  logic [12:0] s13;
  lfsr #(.WIDTH(8),  .TAPS(LFSR8_TAPS),  .SEED(LFSR8_SEED))  d8  (.clk, .rst_n, .en, .out_bit(o8),  .state(s8));
  lfsr #(.WIDTH(11), .TAPS(LFSR11_TAPS), .SEED(LFSR11_SEED)) d11 (.clk, .rst_n, .en, .out_bit(o11), .state(s11));
  lfsr #(.WIDTH(13), .TAPS(LFSR13_TAPS), .SEED(LFSR13_SEED)) d13 (.clk, .rst_n, .en, .out_bit(o13), .state(s13));

  // published register values after each shift
  logic [7:0]  exp8  [19] = '{8'h08,8'h84,8'h42,8'hA1,8'hD0,8'hE8,8'h74,8'hBA,8'hDD,8'hEE,
                              8'h77,8'h3B,8'h1D,8'h0E,8'h87,8'hC3,8'h61,8'h30,8'h18};
  logic [10:0] exp11 [19] = '{11'h00B,11'h405,11'h602,11'h301,11'h180,11'h0C0,11'h060,11'h030,11'h018,
                              11'h00C,11'h006,11'h403,11'h201,11'h100,11'h080,11'h040,11'h020,11'h010,11'h008};
  logic [12:0] exp13 [19] = '{13'h000D,13'h1006,13'h0803,13'h1401,13'h0A00,13'h0500,13'h0280,13'h0140,
                              13'h00A0,13'h0050,13'h0028,13'h1014,13'h080A,13'h1405,13'h1A02,13'h1D01,
                              13'h0E80,13'h0740,13'h03A0};

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

  int p8, p11, p13;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 19; i++) begin
      check(s8 == exp8[i],   $sformatf("LFSR-8 step %0d", i));
      check(s11 == exp11[i], $sformatf("LFSR-11 step %0d", i));
      check(s13 == exp13[i], $sformatf("LFSR-13 step %0d", i));
      check(o8 == exp8[i][0] && o11 == exp11[i][0] && o13 == exp13[i][0], "output bit is the LSB");
      en = 1; @(negedge clk); en = 0;
    end
    // hold
    begin
      logic [7:0] h;
      h = s8;
      repeat (5) @(negedge clk);
      check(s8 == h, "en low holds the register");
    end
    // 2000 further steps against an independent model of each register
    rst_n = 0; @(negedge clk); rst_n = 1; en = 1;
    begin
      int unsigned m8 = 'h08, m11 = 'h00B, m13 = 'h000D, o;
      int bad = 0;
      for (int i = 1; i <= 2000; i++) begin
        o = keystream_model_pkg::step(m8, 8, 8, 4, 3, 2);
        o = keystream_model_pkg::step(m11, 11, 11, 2, 0, 0);
        o = keystream_model_pkg::step(m13, 13, 13, 4, 3, 1);
        @(negedge clk);
        if (s8 != m8[7:0] || s11 != m11[10:0] || s13 != m13[12:0]) bad++;
        checks++;
      end
      failures += bad;
      if (bad) $display("FAIL %0d steps differ from the model", bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
