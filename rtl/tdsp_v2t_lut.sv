// Voltage-to-temperature look-up table of the TDSP.
//
// Converts the 8-bit ADC code into a signed temperature in degrees Celsius
// through a 2**WIDTH-entry table, registered on PCLK. The design specifies a
// look-up table but not its contents; the reference simulation shows the
// pairs 9 -> -9 C, 37 -> 47 C, 43 -> 59 C and 50 -> 73 C, which all lie on
//     temp = 2 * code - 27,
// so every entry is filled from that line (LUT_SLOPE, LUT_OFFSET) and clipped
// to the signed WIDTH-bit range: codes 78 and above read +127 C.
//
// Interface: adc_code/adc_valid in, real_temp/real_valid out.
// Timing: one cycle from adc_code to real_temp.
module tdsp_v2t_lut #(
  parameter int unsigned WIDTH      = tdsp_pkg::TEMP_W,
  parameter int          LUT_SLOPE  = tdsp_pkg::LUT_SLOPE,
  parameter int          LUT_OFFSET = tdsp_pkg::LUT_OFFSET
) (
  input  logic                    PCLK,
  input  logic                    PRESETn,
  input  logic [WIDTH-1:0]        adc_code,
  input  logic                    adc_valid,
  output logic signed [WIDTH-1:0] real_temp,
  output logic                    real_valid
);

  localparam int unsigned DEPTH = 2 ** WIDTH;

  // The table, one constant entry per code.
  logic signed [WIDTH-1:0] table_rom [DEPTH];

  for (genvar c = 0; c < DEPTH; c++) begin : g_rom
    assign table_rom[c] = (WIDTH)'(tdsp_pkg::lut_entry(c, LUT_SLOPE, LUT_OFFSET, WIDTH));
  end

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      real_temp  <= '0;
      real_valid <= 1'b0;
    end else begin
      real_temp  <= table_rom[adc_code];
      real_valid <= adc_valid;
    end
  end

endmodule
