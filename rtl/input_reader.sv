// ADC controller for an ADC0809 converter fed by an SMP11 sample-and-hold.
//
// A five-state machine steps once per falling edge of the ADC's slow clock
// (fall_tick from clock_divider):
//   SAMPLE_CONV  sample = 1, the S&H tracks the input
//   START_CONV   sample = 0 (hold), soc = 1 for exactly one slow-clock period
//   IN_CONV      soc = 0, wait here while eoc = 0
//   END_CONV     eoc seen high: conversion finished
//   READ_CONV    hold_out <= bits, sample = 1 again, valid_out pulses
// and then returns to SAMPLE_CONV. The states, their order, the eoc test and
// the sample/hold_out actions follow the published state diagram. The
// diagram also marks soc <= '1' in IN_CONV, but the text states that soc
// stays high for one slow-clock period and that conversion starts when it
// falls, so here soc is low in IN_CONV.
//
// Interface: bits/eoc come from the converter (eoc is synchronised to clk by
// two flip-flops). sample, soc and hold_out are registered and change on the
// clk edge at which slow_clock falls. valid_out is high for one clk cycle,
// the cycle after hold_out takes a new sample (this valid flag is the
// extension described for the encryption path). A full cycle takes
// 4 + (eoc wait) slow-clock periods.
module input_reader
  import safetalk_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    fall_tick,   // slow_clock falls at the end of this clk cycle
  input  sample_t bits,        // ADC0809 data outputs
  input  logic    eoc,         // ADC0809 end of conversion, high when done
  output logic    sample,      // SMP11 control: 1 = sample, 0 = hold
  output logic    soc,         // ADC0809 start of conversion
  output sample_t hold_out,    // last converted sample
  output logic    valid_out    // one-cycle pulse: hold_out is new
);
  typedef enum logic [2:0] {
    SAMPLE_CONV, START_CONV, IN_CONV, END_CONV, READ_CONV
  } state_t;

  state_t     state, next;
  logic [1:0] eoc_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) eoc_sync <= '0;
    else        eoc_sync <= {eoc_sync[0], eoc};
  end

  always_comb begin
    unique case (state)
      SAMPLE_CONV: next = START_CONV;
      START_CONV:  next = IN_CONV;
      IN_CONV:     next = eoc_sync[1] ? END_CONV : IN_CONV;
      END_CONV:    next = READ_CONV;
      READ_CONV:   next = SAMPLE_CONV;
      default:     next = SAMPLE_CONV;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= SAMPLE_CONV;
      sample    <= 1'b1;
      soc       <= 1'b0;
      hold_out  <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      if (fall_tick) begin
        state  <= next;
        sample <= (next == SAMPLE_CONV) || (next == READ_CONV);
        soc    <= (next == START_CONV);
        if (next == READ_CONV) begin
          hold_out  <= bits;
          valid_out <= 1'b1;
        end
      end
    end
  end
endmodule
