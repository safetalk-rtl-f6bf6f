// Testbench for stream_cipher: an encrypting and a decrypting instance in
// series. Plaintext bits (the published all-0, all-1 and 1010 patterns, then
// random bits with random gaps) must come out of the first as p ^ k one
// clock later, with k from an independent keystream model, and out of the
// second unchanged two clocks later.
module tb_stream_cipher;
  import keystream_model_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic v_in = 0, d_in = 0, v_c, d_c, v_p, d_p;
  stream_cipher enc (.clk, .rst_n, .valid_in(v_in), .din(d_in), .valid_out(v_c), .dout(d_c));
  stream_cipher dec (.clk, .rst_n, .valid_in(v_c),  .din(d_c),  .valid_out(v_p), .dout(d_p));

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

  localparam int NB = 2000;
  bit ks[$];
  bit pt[$], ptq[$], ptq2[$];
  int nc = 0, np = 0;

  always @(posedge clk) if (rst_n) begin
    if (v_c) begin
      check(d_c == (ptq[0] ^ ks[nc]), $sformatf("ciphertext bit %0d", nc));
      void'(ptq.pop_front()); nc++;
    end
    if (v_p) begin
      check(d_p == ptq2[0], $sformatf("decrypted bit %0d", np));
      void'(ptq2.pop_front()); np++;
    end
  end

  initial begin
    keystream(NB + 64, ks);
    for (int i = 0; i < 18; i++) pt.push_back(0);
    for (int i = 0; i < 18; i++) pt.push_back(1);
    for (int i = 0; i < 18; i++) pt.push_back(!i[0]);
    while (pt.size() < NB) pt.push_back($urandom_range(1));
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (pt[i]) begin
      if (i > 54 && $urandom_range(2) == 0) begin v_in = 0; @(negedge clk); end
      v_in = 1; d_in = pt[i];
      ptq.push_back(pt[i]); ptq2.push_back(pt[i]);
      @(negedge clk);
    end
    v_in = 0;
    repeat (5) @(negedge clk);
    check(nc == NB && np == NB, "every bit came through both ciphers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
