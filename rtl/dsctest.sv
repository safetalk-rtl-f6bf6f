// DAC test pattern: a triangle wave for checking the DAC and its filter.
//
// An 8-bit counter steps once every DIV clocks (25.175 MHz / 10000 is about
// 2.5 kHz per step in the published test), counting up from 0 to 255 and
// then back down to 0, and so on. count drives the DAC's 8 data inputs;
// up shows the direction. The turn-around at 255 and 0 without repeating
// the end value is this design's choice.
module dsctest #(
  parameter int unsigned DIV = 10000
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [7:0] count,
  output logic       up
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] div;
  logic          step;

  assign step = (div == CW'(DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div   <= '0;
      count <= '0;
      up    <= 1'b1;
    end else begin
      div <= step ? '0 : div + 1'b1;
      if (step) begin
        if (up) begin
          if (count == 8'hFF) begin up <= 1'b0; count <= 8'hFE; end
          else                count <= count + 1'b1;
        end else begin
          if (count == 8'h00) begin up <= 1'b1; count <= 8'h01; end
          else                count <= count - 1'b1;
        end
      end
    end
  end
endmodule
