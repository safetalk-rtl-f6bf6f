// Testbench for fifo (16 x 8): random writes and active-low reads compared
// with a queue model: q after each read, full, empty and usedw every cycle,
// writes ignored when full (even with a read in the same cycle), reads ignored when empty, sclr empties it.
module tb_fifo;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = !clk;

  logic sclr = 1, wrreq = 0, rdreq_n = 1, full, empty;
  logic [7:0] data = 0, q;
  logic [4:0] usedw;
  fifo #(.DEPTH(16), .WIDTH(8)) dut (.clock(clk), .sclr, .data, .wrreq, .rdreq_n, .q, .full, .empty, .usedw);

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

  logic [7:0] m[$];
  logic [7:0] exp_q;
  bit rd, wr, saw_full = 0;
  int bias;
  initial begin
    @(negedge clk); @(negedge clk);
    sclr = 0;
    for (int i = 0; i < 6000; i++) begin
      bias = (i / 500) % 2 ? 3 : 1;     // phases that fill and that drain
      wr = ($urandom_range(3) < bias + 1);
      rd = ($urandom_range(3) >= bias);
      wrreq = wr; rdreq_n = !rd; data = $urandom;
      if (i == 3000) sclr = 1;
      check(full == (m.size() == 16) && empty == (m.size() == 0) && usedw == m.size(),
            $sformatf("flags step %0d size %0d usedw %0d", i, m.size(), usedw));
      if (m.size() == 16) saw_full = 1;
      @(negedge clk);
      if (sclr) begin m.delete(); sclr = 0; end
      else begin
        bit was_full;
        was_full = (m.size() == 16);
        if (rd && m.size() > 0) begin
          exp_q = m.pop_front();
          check(q == exp_q, $sformatf("q %02x want %02x", q, exp_q));
        end
        if (wr && !was_full) m.push_back(data);
      end
    end
    check(saw_full, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
