// Interface register of the TDSP.
//
// Two registers sit between the outside world and the datapath:
//  * the ADC register takes INPUTADC on every sample_tick from the counter,
//    so the asynchronous converter output is picked up synchronously, once
//    per sample period; adc_valid goes high with the first sample after reset
//    and stays high, holding the rest of the pipeline quiet until then;
//  * the reference register takes PWDATA[WIDTH-1:0] on an APB write, i.e. in
//    a cycle with PSEL, PENABLE and PWRITE all high. The value is the host's
//    highest allowed temperature in signed degrees Celsius; ref_valid goes
//    high with the first write so the watchdog can use a default limit before.
// The design names these functions; the valid flags, the use of PWDATA[7:0]
// and the absence of an address decode (the TDSP has a single register) are
// this design's choices.
//
// Interface: APB slave inputs (PCLK, PRESETn, PSEL, PENABLE, PWRITE, PWDATA),
// INPUTADC, sample_tick; outputs adc_code/adc_valid and reftemp/ref_valid.
// Only PWDATA[WIDTH-1:0] is used; the upper write-data bits are ignored.
// Timing: every output is a register updated one edge after its strobe.
module tdsp_interface_reg #(
  parameter int unsigned WIDTH = tdsp_pkg::TEMP_W
) (
  input  logic             PCLK,
  input  logic             PRESETn,
  input  logic             PSEL,
  input  logic             PENABLE,
  input  logic             PWRITE,
  input  logic [31:0]      PWDATA,
  input  logic [WIDTH-1:0] INPUTADC,
  input  logic             sample_tick,
  output logic [WIDTH-1:0] adc_code,
  output logic             adc_valid,
  output logic [WIDTH-1:0] reftemp,
  output logic             ref_valid
);

  logic apb_write;
  assign apb_write = PSEL && PENABLE && PWRITE;

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      adc_code  <= '0;
      adc_valid <= 1'b0;
    end else if (sample_tick) begin
      adc_code  <= INPUTADC;
      adc_valid <= 1'b1;
    end
  end

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      reftemp   <= '0;
      ref_valid <= 1'b0;
    end else if (apb_write) begin
      reftemp   <= PWDATA[WIDTH-1:0];
      ref_valid <= 1'b1;
    end
  end

  // APB: the access phase (PENABLE) only ever follows a selected setup phase.
  a_penable_needs_psel: assert property (@(posedge PCLK) disable iff (!PRESETn)
                                         PENABLE |-> PSEL)
    else $error("APB: PENABLE high without PSEL");

endmodule
