// Behavioural model of the digital side of an ADC0809 converter for the
// testbenches (not synthesizable logic of the design). analog_in stands for
// the voltage on IN0, given directly as the code the conversion will yield.
// A rising clock edge that sees start (SOC) high begins a conversion: eoc
// falls and the input is held. CONV_CLKS clock periods later the result
// appears on data, and one clock after that eoc rises again. ale and oe are
// accepted and ignored (tied high on the board). The number of the
// conversion is counted in n_conv; each result is also pushed on a queue.
module adc0809_model #(
  parameter int unsigned CONV_CLKS = 84
) (
  input  logic       clock,
  input  logic       start,
  input  logic       ale,
  input  logic       oe,
  input  logic [7:0] analog_in,
  output logic [7:0] data,
  output logic       eoc
);
  logic [7:0] held;
  int unsigned cnt = 0;
  bit          busy = 0;
  int unsigned n_conv = 0;
  logic [7:0]  results[$];

  initial begin
    data = '0;
    eoc  = 1'b1;
  end

  always @(posedge clock) begin
    if (!busy) begin
      if (start) begin
        busy <= 1;
        cnt  <= 0;
        eoc  <= 1'b0;
        held <= analog_in;
      end
    end else begin
      cnt <= cnt + 1;
      if (cnt == CONV_CLKS - 2) data <= held;
      if (cnt == CONV_CLKS - 1) begin
        eoc  <= 1'b1;
        busy <= 0;
        n_conv <= n_conv + 1;
        results.push_back(held);
      end
    end
  end

  wire unused_ok = ale & oe;
endmodule
