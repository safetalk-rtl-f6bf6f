// Workload testbench: the SafeTalk top configured for a 33.6 kbit/s modem
// line (UART_DIVISOR = 23: 25.175 MHz / 46 / 16 = 34.2 kbit/s, the divisor
// worked out in the original for that modem) carrying compressed speech
// (comp_en = 1, one ADC sample in 8 kept). A behavioural ADC0809 feeds
// random samples and tx is looped back to rx. At this rate the line needs
// 1.19 k frames/s against about 3.1 k available, so the test checks that no
// sample is ever dropped, that every kept sample comes out of dataout in
// order (top 7 bits exact, LSB = 1 ^ first key bit of its byte, because the
// transmitted LSB is forced to 1), and that each bit lasts 16 x 46 = 736
// clocks. It then switches compression off for a while: the line is now
// far too slow, so drops must happen and the data must still be correct.
// All other parameters are the defaults.
module tb_safetalk_modem;
  import safetalk_pkg::*;
  import keystream_model_pkg::*;
  localparam int BIT_CLKS = 16 * 2 * 23;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #20 clk = !clk;

  logic comp_en = 1;
  sample_t adc_bits, analog = 0, dataout, dsctest_out;
  logic adc_eoc, adc_soc, adc_sample, adc_clk, tx;
  logic parityerr, framingerr, overrun, tx_drop;

  safetalk #(.UART_DIVISOR(23)) dut (.clk, .rst_n, .comp_en, .adc_bits, .adc_eoc, .adc_soc,
    .adc_sample, .adc_clk, .tx, .rx(tx), .dataout, .parityerr, .framingerr, .overrun, .tx_drop,
    .dsctest_out);

  adc0809_model #(.CONV_CLKS(84)) adc (.clock(adc_clk), .start(adc_soc), .ale(1'b1), .oe(1'b1),
    .analog_in(analog), .data(adc_bits), .eoc(adc_eoc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge adc_soc) analog <= $urandom;

  // expected samples: each conversion, filtered by the 1-in-8 phase, minus drops
  sample_t expq[$], pend;
  sample_t kb[400];
  int nconv = 0, phase = 0, commit_at = -1, ncyc = 0;
  int n_kept = 0, n_drop = 0, n_drop_comp = 0, n_out = 0;
  bit pend_v = 0;
  always @(posedge clk) if (rst_n) begin
    ncyc++;
    if (!comp_en) phase = 0;
    if (adc.results.size() > nconv) begin
      pend = adc.results[nconv]; nconv++;
      pend_v = 1; commit_at = ncyc + 200;
    end
    if (tx_drop) begin
      pend_v = 0; n_drop++;
      if (comp_en) n_drop_comp++;
    end
    if (pend_v && ncyc == commit_at) begin
      pend_v = 0;
      if (!comp_en || phase == 0) begin expq.push_back(pend); n_kept++; end
      if (comp_en) phase = (phase + 1) % 8;
    end
  end

  logic dv_q = 0;
  always @(posedge clk) if (rst_n) begin
    dv_q <= dut.dec_out_valid;
    if (dv_q) begin
      check(expq.size() > 0, "decrypted sample has a source");
      if (expq.size() > 0) begin
        check(dataout == {expq[0][7:1], 1'b1 ^ kb[n_out][0]},
              $sformatf("sample %0d: got %02x from %02x", n_out, dataout, expq[0]));
        void'(expq.pop_front());
      end
      n_out++;
    end
    if (parityerr || framingerr || overrun) begin
      failures++; checks++;
      $display("FAIL line error flag at %0t", $time);
    end
  end

  // bit timing, measured from the end of the start bit (data bit 0 is the forced 1)
  int t = 0, t0 = -1, t1 = -1, n_edges = 0;
  logic tx_q = 1;
  always @(posedge clk) if (rst_n) begin
    t++; tx_q <= tx;
    if (dut.u_uart.u_txmit.start) begin t0 = t; t1 = -1; end
    if (tx != tx_q && t0 >= 0) begin
      if (t1 < 0 && tx) begin
        t1 = t;
        check(t1 - t0 > BIT_CLKS - 46 && t1 - t0 <= BIT_CLKS + 1, $sformatf("start bit %0d clocks", t1 - t0));
      end else if (t1 >= 0) begin
        check((t - t1) % BIT_CLKS == 0, $sformatf("tx edge %0d after start bit", t - t1));
        n_edges++;
      end
    end
  end

  initial begin
    for (int i = 0; i < 400; i++) kb[i] = key_byte(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nconv >= 400);            // compressed speech for 400 conversions
    repeat (400) @(posedge clk);
    check(n_drop == 0, "no drops with compression at 34.2 kbit/s");
    comp_en = 0;                    // uncompressed: the line is far too slow
    wait (nconv >= 480);
    repeat (400) @(posedge clk);
    comp_en = 1;
    wait (expq.size() == 0 && dut.txf_empty && !pend_v);
    check(n_out == n_kept, "every kept sample delivered");
    $display("conversions %0d kept %0d delivered %0d drops %0d (while compressed %0d), bit edges %0d",
             nconv, n_kept, n_out, n_drop, n_drop_comp, n_edges);
    check(n_out >= 50, "compressed samples delivered");
    check(n_drop > 0, "uncompressed speech overflows the slow line");
    check(n_drop_comp == 0, "no drop while compressed");
    check(n_edges > 100, "bit timing exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
