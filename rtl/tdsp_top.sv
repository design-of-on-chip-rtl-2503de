// Temperature-based digital signal processing unit (TDSP), top level.
//
// An APB peripheral that monitors on-chip temperature. An external 8-bit ADC
// (not part of this RTL) drives INPUTADC; the seven sub-modules form a
// pipeline, wired as the design's block diagram shows:
//
//   u1 counter ------------.  sample strobe every 8 PCLK cycles
//   u2 interface register  |  samples INPUTADC, takes the reference from PWDATA
//   u3 voltage-to-temperature look-up table
//   u4 programmable watchdog    low / average / high range
//   u5 interrupt generator      temp_out, interrupt_low, interrupt_high
//   u6 output converter         PRDATA word
//   u7 function controller      PREADY
//
// PRDATA always holds the latest result; PREADY is high while an interrupt
// is raised. A host write (PSEL, PENABLE, PWRITE high) sets the reference
// temperature, which replaces the default high limit of the watchdog.
//
// The watchdog's average_temp flag has no consumer: the average range is
// reported by the absence of both interrupts.
//
// Timing: a code present on INPUTADC at a sample strobe reaches PRDATA and
// PREADY five rising edges later (interface register, table, watchdog,
// interrupt generator, output converter/controller). A reference write acts
// on the classification from the next cycle on and shows on PRDATA three
// edges after the write.
module tdsp_top #(
  parameter int unsigned WIDTH = tdsp_pkg::TEMP_W
) (
  input  logic             PCLK,
  input  logic             PRESETn,
  input  logic             PSEL,
  input  logic             PENABLE,
  input  logic             PWRITE,
  input  logic [31:0]      PWDATA,
  input  logic [WIDTH-1:0] INPUTADC,
  output logic [31:0]      PRDATA,
  output logic             PREADY
);

  logic                    sample_tick;
  logic [WIDTH-1:0]        adc_code;
  logic                    adc_valid;
  logic [WIDTH-1:0]        reftemp;
  logic                    ref_valid;
  logic signed [WIDTH-1:0] real_temp;
  logic                    real_valid;
  logic signed [WIDTH-1:0] temp_value;
  logic                    max_temp, low_temp, average_temp;
  logic signed [WIDTH-1:0] temp_out;
  logic                    interrupt_low, interrupt_high;

  tdsp_counter u1_counter (
    .PCLK, .PRESETn, .sample_tick
  );

  tdsp_interface_reg #(.WIDTH(WIDTH)) u2_interface_reg (
    .PCLK, .PRESETn, .PSEL, .PENABLE, .PWRITE, .PWDATA, .INPUTADC,
    .sample_tick, .adc_code, .adc_valid, .reftemp, .ref_valid
  );

  tdsp_v2t_lut #(.WIDTH(WIDTH)) u3_lut (
    .PCLK, .PRESETn, .adc_code, .adc_valid, .real_temp, .real_valid
  );

  tdsp_watchdog #(.WIDTH(WIDTH)) u4_watchdog (
    .PCLK, .PRESETn, .real_temp, .real_valid,
    .reftemp(signed'(reftemp)), .ref_valid,
    .temp_value, .max_temp, .low_temp, .average_temp
  );

  tdsp_interrupt_gen #(.WIDTH(WIDTH)) u5_interrupt_gen (
    .PCLK, .PRESETn, .temp_value, .max_temp, .low_temp,
    .temp_out, .interrupt_low, .interrupt_high
  );

  tdsp_output_converter #(.WIDTH(WIDTH)) u6_output_converter (
    .PCLK, .PRESETn, .temp_out, .interrupt_low, .interrupt_high, .PRDATA
  );

  tdsp_function_controller u7_function_controller (
    .PCLK, .PRESETn, .interrupt_low, .interrupt_high, .PREADY
  );

endmodule
