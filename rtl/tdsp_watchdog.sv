// Programmable watchdog unit of the TDSP.
//
// Classes each temperature into one of three ranges:
//   low      real_temp <  LOW_LIMIT
//   high     real_temp >  high limit
//   average  otherwise
// The high limit is programmable: it is the reference temperature the host
// wrote over APB once ref_valid is set, and HIGH_DEFAULT before that. The
// design specifies the ranges, the host-set highest temperature and the
// comparison; the two limit values (0 C and 50 C) and the strict comparisons
// are this design's choice. No range is raised before the first valid sample.
//
// Interface: real_temp/real_valid from the table, reftemp/ref_valid from the
// interface register; outputs temp_value and one-hot max_temp, low_temp,
// average_temp (all zero while no valid sample exists).
// Timing: one cycle from real_temp to the outputs.
module tdsp_watchdog #(
  parameter int unsigned WIDTH        = tdsp_pkg::TEMP_W,
  parameter int          LOW_LIMIT    = tdsp_pkg::LOW_LIMIT_C,
  parameter int          HIGH_DEFAULT = tdsp_pkg::HIGH_DEFAULT_C
) (
  input  logic                    PCLK,
  input  logic                    PRESETn,
  input  logic signed [WIDTH-1:0] real_temp,
  input  logic                    real_valid,
  input  logic signed [WIDTH-1:0] reftemp,
  input  logic                    ref_valid,
  output logic signed [WIDTH-1:0] temp_value,
  output logic                    max_temp,
  output logic                    low_temp,
  output logic                    average_temp
);

  import tdsp_pkg::*;

  localparam logic signed [WIDTH-1:0] LOW_L  = (WIDTH)'(LOW_LIMIT);
  localparam logic signed [WIDTH-1:0] HIGH_D = (WIDTH)'(HIGH_DEFAULT);

  logic signed [WIDTH-1:0] high_limit;
  temp_range_e             range_d, range_q;

  always_comb begin
    high_limit = ref_valid ? reftemp : HIGH_D;
    if (!real_valid)               range_d = RANGE_NONE;
    else if (real_temp < LOW_L)    range_d = RANGE_LOW;
    else if (real_temp > high_limit) range_d = RANGE_HIGH;
    else                           range_d = RANGE_AVERAGE;
  end

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      temp_value <= '0;
      range_q    <= RANGE_NONE;
    end else begin
      temp_value <= real_valid ? real_temp : '0;
      range_q    <= range_d;
    end
  end

  assign low_temp     = (range_q == RANGE_LOW);
  assign max_temp     = (range_q == RANGE_HIGH);
  assign average_temp = (range_q == RANGE_AVERAGE);

endmodule
