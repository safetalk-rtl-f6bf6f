// End-to-end testbench of the SafeTalk top at its default parameters: a
// behavioural ADC0809 (84-clock conversions, about 100 us at 840 kHz) feeds
// random samples, tx is looped back to rx, and every sample that is not
// dropped must come out of the DAC data register in order, decrypted, with
// its top 7 bits intact and its LSB equal to 1 ^ (first key bit of its
// byte), because the transmitted LSB is forced to 1.
// Mechanisms that must each happen at least once (counted): samples queued
// in the transmit FIFO, transmit-FIFO overflow drops (the ADC outruns the
// 87.4 kbit/s line when uncompressed), compression on (one sample in 8
// kept, decompressor in the receive path), switching compression on and off,
// the ADC controller waiting on eoc, parity and framing errors on frames
// injected at the end. Also checked: the UART bit time is 16 x 2 x 9 = 288
// clocks, the slow ADC clock period is 30 clocks and one sample cycle takes
// 4 + 84 + synchronisation slow-clock periods.
module tb_safetalk;
  import safetalk_pkg::*;
  import keystream_model_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #20 clk = !clk;            // about 25 MHz

  logic comp_en = 0, inject = 0, inj_line = 1;
  sample_t adc_bits, analog = 0, dataout, dsctest_out;
  logic adc_eoc, adc_soc, adc_sample, adc_clk, tx, rx;
  logic parityerr, framingerr, overrun, tx_drop;

  assign rx = inject ? inj_line : tx;

  safetalk dut (.clk, .rst_n, .comp_en, .adc_bits, .adc_eoc, .adc_soc, .adc_sample, .adc_clk,
    .tx, .rx, .dataout, .parityerr, .framingerr, .overrun, .tx_drop, .dsctest_out);

  adc0809_model #(.CONV_CLKS(84)) adc (.clock(adc_clk), .start(adc_soc), .ale(1'b1), .oe(1'b1),
    .analog_in(analog), .data(adc_bits), .eoc(adc_eoc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge adc_soc) analog <= $urandom;

  // ---- expected sample stream --------------------------------------------
  sample_t expq[$];
  int nconv = 0, phase = 0, commit_at = -1, ncyc = 0;
  int n_drop = 0, n_kept = 0, n_kept_comp = 0, n_out = 0, n_out_comp = 0;
  sample_t pend;
  bit pend_v = 0, pend_comp = 0;
  sample_t kb[600];

  always @(posedge clk) if (rst_n) begin
    ncyc++;
    if (!comp_en) phase = 0;
    if (adc.results.size() > nconv) begin
      pend = adc.results[nconv]; nconv++;
      pend_v = 1; commit_at = ncyc + 200;
    end
    if (tx_drop) begin
      check(pend_v, "a drop refers to a fresh sample");
      pend_v = 0; n_drop++;
    end
    if (pend_v && ncyc == commit_at) begin
      pend_v = 0;
      if (!comp_en || phase == 0) begin
        expq.push_back(pend); n_kept++;
        if (comp_en) n_kept_comp++;
      end
      if (comp_en) phase = (phase + 1) % 8;
    end
    if (dut.dec_out_valid) begin
      n_out_comp += comp_en;
    end
  end

  // data register: compare on each new decrypted sample
  logic dv_q = 0;
  always @(posedge clk) if (rst_n) begin
    dv_q <= dut.dec_out_valid;
    if (dv_q && !inject) begin
      check(expq.size() > 0, "decrypted sample has a source");
      if (expq.size() > 0) begin
        check(dataout == {expq[0][7:1], 1'b1 ^ kb[n_out][0]},
              $sformatf("sample %0d: got %02x from %02x", n_out, dataout, expq[0]));
        void'(expq.pop_front());
      end
      n_out++;
    end
  end

  // ---- mechanisms and timing ---------------------------------------------
  int max_used = 0, eoc_waits = 0, n_pe = 0, n_fe = 0, switches = 0;
  int lsb_checked = 0;
  logic comp_q = 0, pe_q = 0, fe_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.txf_usedw > max_used) max_used = dut.txf_usedw;
    comp_q <= comp_en;
    if (comp_en != comp_q) switches++;
    pe_q <= parityerr; fe_q <= framingerr;
    if (parityerr && !pe_q) n_pe++;
    if (framingerr && !fe_q) n_fe++;
    if (dut.txf_wrreq) begin check(dut.txf_data[0], "transmitted LSB forced to 1"); lsb_checked++; end
  end

  // UART bit timing (the forced LSB makes data bit 0 a 1, so the first
  // rising edge ends the start bit): the start bit begins at the write, between baud
  // strobes, so it lasts 271..288 clocks; every later edge of the frame lies
  // a whole number of 288-clock bits after the end of the start bit.
  int t = 0, t0 = -1, t1 = -1, nbit_edges = 0;
  logic tx_q = 1;
  always @(posedge clk) if (rst_n) begin
    t++; tx_q <= tx;
    if (dut.u_uart.u_txmit.start) begin t0 = t; t1 = -1; end
    if (tx != tx_q && t0 >= 0) begin
      if (t1 < 0 && tx) begin
        t1 = t;
        check(t1 - t0 >= 271 && t1 - t0 <= 289, $sformatf("start bit %0d clocks", t1 - t0));
      end else if (t1 >= 0) begin
        check((t - t1) % 288 == 0 && t - t1 <= 288 * 10, $sformatf("tx edge %0d after start bit", t - t1));
        nbit_edges++;
      end
    end
  end

  // ADC timing
  int soc_rise = -1, sc_rise = -1, ns = 0, in_conv_cycles = 0;
  logic soc_q = 0, ac_q = 0;
  always @(posedge clk) if (rst_n) begin
    ns++; soc_q <= adc_soc; ac_q <= adc_clk;
    if (adc_clk && !ac_q) begin
      if (sc_rise >= 0) check(ns - sc_rise == 30, "slow clock period 30 clocks");
      sc_rise = ns;
    end
    if (adc_soc && !soc_q) begin
      if (soc_rise >= 0) check((ns - soc_rise) % 30 == 0 && (ns - soc_rise) / 30 >= 88
                               && (ns - soc_rise) / 30 <= 92,
                               $sformatf("sample cycle %0d slow clocks", (ns - soc_rise) / 30));
      soc_rise = ns;
    end
    if (int'(dut.u_encryptor.u_input_reader.state) == 2 && !adc_eoc) in_conv_cycles++;
  end

  task automatic wait_conv(input int n);
    wait (nconv >= n);
    repeat (400) @(posedge clk);
  endtask

  task automatic send_frame(input sample_t b, input bit bad_par, input bit bad_stop);
    logic [10:0] f;
    f = {!bad_stop, (^b) ^ bad_par, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      inj_line = f[i];
      repeat (288) @(posedge clk);
    end
    inj_line = 1;
    repeat (600) @(posedge clk);
  endtask

  initial begin
    for (int i = 0; i < 600; i++) kb[i] = key_byte(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait_conv(200);                  // uncompressed: the FIFO fills and overflows
    comp_en = 1;
    wait_conv(360);                  // compressed: 1 in 8
    comp_en = 0;
    wait_conv(380);
    comp_en = 1;                     // stop feeding almost everything and drain
    wait (expq.size() == 0 && dut.txf_empty && !pend_v);
    check(n_out == n_kept, "every kept sample reached the DAC register");
    // line errors, injected after the data checks
    wait (tx == 1'b1 && dut.u_uart.txrdy);
    inject = 1;
    send_frame(8'h5A, 1, 0);
    check(parityerr, "parity error flagged");
    send_frame(8'hA5, 0, 1);
    check(framingerr, "framing error flagged");
    repeat (1000) @(posedge clk);
    // mechanism coverage
    $display("conversions %0d kept %0d (compressed %0d) dropped %0d delivered %0d max FIFO %0d",
             nconv, n_kept, n_kept_comp, n_drop, n_out, max_used);
    $display("mode switches %0d, eoc wait cycles %0d, parity errors %0d, framing errors %0d, LSB forced %0d",
             switches, in_conv_cycles, n_pe, n_fe, lsb_checked);
    check(max_used > 1, "samples queued in the transmit FIFO");
    check(max_used == 16, "transmit FIFO filled");
    check(n_drop > 0, "overflow drops happened");
    check(n_kept_comp > 0, "compression kept samples");
    check(n_out_comp > 0, "decompressor delivered samples");
    check(switches >= 3, "compression switched on and off");
    check(in_conv_cycles > 0, "controller waited on eoc");
    check(n_pe > 0 && n_fe > 0, "parity and framing errors detected");
    check(lsb_checked > 0, "LSB forcing exercised");
    check(n_out > 150, "enough samples delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
