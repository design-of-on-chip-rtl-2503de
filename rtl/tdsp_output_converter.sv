// Output converter of the TDSP.
//
// Packs the temperature and the two interrupts into the 32-bit APB read word:
//   PRDATA[31:24]  zero
//   PRDATA[23]     sign of the temperature (1 = below 0 C)
//   PRDATA[22:16]  magnitude of the temperature in degrees C
//   PRDATA[15:8]   interrupt_low,  repeated on all 8 bits
//   PRDATA[7:0]    interrupt_high, repeated on all 8 bits
// This layout is the one the design's reference simulation prints (for
// example 32'h0049_00FF at 73 C with a high-temperature interrupt, and the
// magnitude 9 in bits [22:16] at -9 C). The sign bit position is inferred
// from that magnitude form and is this design's reading; a temperature of
// -128 C, which the table never produces, would read as magnitude 0.
//
// Interface: temp_out (two's complement), interrupt_low, interrupt_high in;
// PRDATA out.  Timing: one register stage.
module tdsp_output_converter #(
  parameter int unsigned WIDTH = tdsp_pkg::TEMP_W
) (
  input  logic                    PCLK,
  input  logic                    PRESETn,
  input  logic signed [WIDTH-1:0] temp_out,
  input  logic                    interrupt_low,
  input  logic                    interrupt_high,
  output logic [31:0]             PRDATA
);

  logic             sign;
  logic [WIDTH-2:0] magnitude;
  logic [31:0]      word;

  always_comb begin
    sign      = temp_out[WIDTH-1];
    magnitude = sign ? (WIDTH-1)'(-temp_out) : (WIDTH-1)'(temp_out);
    word      = '0;
    word[23]    = sign;
    word[22:16] = 7'(magnitude);
    word[15:8]  = {8{interrupt_low}};
    word[7:0]   = {8{interrupt_high}};
  end

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) PRDATA <= '0;
    else          PRDATA <= word;
  end

endmodule
