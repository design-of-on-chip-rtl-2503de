// Sample counter of the TDSP.
//
// Counts PCLK cycles modulo COUNT_CYCLES (8, as the design specifies) and
// raises sample_tick for one cycle at the end of every period. The interface
// register takes a new ADC code on that cycle, so the ADC is read once every
// 8 clocks. Which cycle of the period carries the strobe (the last one, count
// COUNT_CYCLES-1) is this design's choice.
//
// Interface: PCLK, PRESETn (asynchronous, active low), sample_tick (out).
// Timing: sample_tick is decoded from the count register; it
// first rises COUNT_CYCLES-1 rising edges after reset is released, then every
// COUNT_CYCLES cycles.
module tdsp_counter #(
  parameter int unsigned COUNT_CYCLES = tdsp_pkg::COUNT_CYCLES
) (
  input  logic PCLK,
  input  logic PRESETn,
  output logic sample_tick
);

  localparam int unsigned CNT_W = (COUNT_CYCLES > 1) ? $clog2(COUNT_CYCLES) : 1;
  localparam logic [CNT_W-1:0] LAST = CNT_W'(COUNT_CYCLES - 1);

  logic [CNT_W-1:0] count;

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn)            count <= '0;
    else if (count == LAST)  count <= '0;
    else                     count <= count + 1'b1;
  end

  assign sample_tick = (count == LAST);

endmodule
