// Interrupt generator of the TDSP.
//
// Produces the values the CPU reads: the current temperature (temp_out) and
// the two interrupt lines, interrupt_low for the low range and
// interrupt_high for the high range. The interrupts are levels that follow
// the watchdog's class: they fall by themselves when the temperature returns
// to the average range, as in the design's reference simulation, and need no
// clear. Registering the outputs is this design's choice.
//
// Interface: temp_value, max_temp, low_temp in; temp_out, interrupt_low,
// interrupt_high out.  Timing: one cycle.
module tdsp_interrupt_gen #(
  parameter int unsigned WIDTH = tdsp_pkg::TEMP_W
) (
  input  logic                    PCLK,
  input  logic                    PRESETn,
  input  logic signed [WIDTH-1:0] temp_value,
  input  logic                    max_temp,
  input  logic                    low_temp,
  output logic signed [WIDTH-1:0] temp_out,
  output logic                    interrupt_low,
  output logic                    interrupt_high
);

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      temp_out       <= '0;
      interrupt_low  <= 1'b0;
      interrupt_high <= 1'b0;
    end else begin
      temp_out       <= temp_value;
      interrupt_low  <= low_temp;
      interrupt_high <= max_temp;
    end
  end

  // The watchdog raises at most one range at a time.
  a_one_range: assert property (@(posedge PCLK) disable iff (!PRESETn)
                                !(max_temp && low_temp))
    else $error("low and high temperature raised together");

endmodule
