// Testbench for adc_cipher_connect with a behavioural ADC0809. Each
// conversion result must leave the encryptor as result ^ key byte n
// (independent keystream model), in order. Covered: plain operation; the
// compressor (comp_en) keeping one sample in 8; samples dropped, without
// using keystream, while allow is low; the soc/sample/eoc protocol; and
// the slow clock period of 2*ADC_DIVISOR clocks.
module tb_adc_cipher_connect;
  import safetalk_pkg::*;
  import keystream_model_pkg::*;
  localparam int DIV = 15;
  localparam int CONV = 10;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic comp_en = 0, allow = 1;
  sample_t adc_bits, analog = 0;
  logic adc_eoc, adc_soc, adc_sample, adc_clk;
  logic valid_out, busy, dropped;
  sample_t dout;

  adc_cipher_connect #(.ADC_DIVISOR(DIV), .COMP_N(8)) dut (
    .clk, .rst_n, .comp_en, .allow, .adc_bits, .adc_eoc, .adc_soc, .adc_sample, .adc_clk,
    .valid_out, .dout, .busy, .dropped);

  adc0809_model #(.CONV_CLKS(CONV)) adc (
    .clock(adc_clk), .start(adc_soc), .ale(1'b1), .oe(1'b1), .analog_in(analog),
    .data(adc_bits), .eoc(adc_eoc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the analog input changes every conversion
  always @(posedge adc_soc) analog <= $urandom;

  // expected stream: conversion results, thinned by the compressor, minus drops
  sample_t expq[$];
  int nconv_seen = 0, phase = 0, nenc = 0, ndrop = 0, nkept = 0;
  sample_t kb[400];
  logic comp_q = 0;
  sample_t last_res;
  bit cand_pending = 0;

  always @(posedge clk) if (rst_n) begin
    comp_q <= comp_en;
    if (comp_en && !comp_q) phase = 0;
    if (adc.results.size() > nconv_seen) begin
      last_res = adc.results[nconv_seen];
      nconv_seen++;
      if (!comp_en || phase == 0) cand_pending = 1;
      if (comp_en) phase = (phase + 1) % 8;
    end
    if (dropped) begin
      check(cand_pending, "drop only of a candidate sample");
      cand_pending = 0; ndrop++;
    end
    if (cand_pending && dut.take) begin
      expq.push_back(last_res); cand_pending = 0; nkept++;
    end
    if (valid_out) begin
      check(expq.size() > 0, "output has a source sample");
      if (expq.size() > 0) begin
        check(dout == (expq[0] ^ kb[nenc]), $sformatf("ciphertext %0d", nenc));
        void'(expq.pop_front());
      end
      nenc++;
    end
  end

  // soc protocol and slow clock period
  int soc_len = 0, n = 0, last_rise = 0, rises = 0;
  logic soc_q = 0, clk_q = 0;
  always @(posedge clk) if (rst_n) begin
    n++; soc_q <= adc_soc; clk_q <= adc_clk;
    if (adc_soc) begin soc_len++; check(!adc_sample, "S&H holding while soc"); end
    if (!adc_soc && soc_q) begin check(soc_len == 2 * DIV, "soc one slow period"); soc_len = 0; end
    if (adc_clk && !clk_q) begin
      if (rises > 0) check(n - last_rise == 2 * DIV, "slow clock period");
      last_rise = n; rises++;
    end
  end

  initial begin
    for (int i = 0; i < 400; i++) kb[i] = key_byte(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nconv_seen == 30);
    comp_en = 1;
    wait (nconv_seen == 30 + 8 * 12);
    comp_en = 0;
    wait (nconv_seen == 140);
    allow = 0;
    wait (nconv_seen == 150);
    allow = 1;
    wait (nconv_seen == 170);
    repeat (200) @(posedge clk);
    check(expq.size() == 0, "all accepted samples encrypted");
    check(ndrop >= 9, $sformatf("samples dropped while allow low (%0d)", ndrop));
    check(nkept == nenc, "kept = encrypted");
    $display("conversions %0d encrypted %0d dropped %0d", nconv_seen, nenc, ndrop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
