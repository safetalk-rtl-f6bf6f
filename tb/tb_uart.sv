// Testbench for uart: two UARTs, one with even and one with odd parity,
// each looped back from tx to rx. The published controller test bytes
// 11, 22, 55, 00, A5, 33 and 100 random bytes written with write_n must be
// read back with read_n unchanged and without error flags. Strobe: clk/4.
module tb_uart;
  import safetalk_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic en = 0;
  int cc = 0;
  always @(posedge clk) begin cc++; en <= (cc % 4 == 0); end

  logic    write_n[2], read_n[2], txrdy[2], tx[2], rxrdy[2], pe[2], fe[2], ov[2];
  sample_t datain[2], dataout[2];

  uart #(.ODD_PARITY(1'b0)) u_even (.clk, .rst_n, .mclkx16_en(en), .write_n(write_n[0]), .datain(datain[0]),
    .txrdy(txrdy[0]), .tx(tx[0]), .rx(tx[0]), .read_n(read_n[0]), .dataout(dataout[0]), .rxrdy(rxrdy[0]),
    .parityerr(pe[0]), .framingerr(fe[0]), .overrun(ov[0]));
  uart #(.ODD_PARITY(1'b1)) u_odd (.clk, .rst_n, .mclkx16_en(en), .write_n(write_n[1]), .datain(datain[1]),
    .txrdy(txrdy[1]), .tx(tx[1]), .rx(tx[1]), .read_n(read_n[1]), .dataout(dataout[1]), .rxrdy(rxrdy[1]),
    .parityerr(pe[1]), .framingerr(fe[1]), .overrun(ov[1]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  sample_t vals[$] = '{8'h11, 8'h22, 8'h55, 8'h00, 8'hA5, 8'h33};
  initial begin
    write_n = '{1, 1}; read_n = '{1, 1}; datain = '{0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    for (int i = 0; i < 100; i++) vals.push_back($urandom);
    foreach (vals[i]) begin
      for (int u = 0; u < 2; u++) begin
        wait (txrdy[u]); @(negedge clk);
        datain[u] = vals[i]; write_n[u] = 0; @(negedge clk); write_n[u] = 1;
      end
      for (int u = 0; u < 2; u++) begin
        wait (rxrdy[u]); @(negedge clk);
        check(!pe[u] && !fe[u] && !ov[u], $sformatf("no error flags (uart %0d)", u));
        read_n[u] = 0; @(negedge clk); read_n[u] = 1;
        check(dataout[u] == vals[i], $sformatf("uart %0d byte %02x got %02x", u, vals[i], dataout[u]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
