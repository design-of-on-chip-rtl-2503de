// Function controller of the TDSP.
//
// Drives PREADY, the TDSP's signal to the CPU that the unit needs attention:
// it is high while either temperature interrupt is raised. The design gives
// the controller only the two interrupt lines as inputs and PREADY as its
// output, and its reference simulation shows PREADY high exactly while an
// interrupt is; this block follows that. Note that PREADY is therefore used
// as an attention flag, not as the APB wait-state signal.
//
// Interface: interrupt_low, interrupt_high in; PREADY out.
// Timing: one register stage, so PREADY changes together with PRDATA.
module tdsp_function_controller (
  input  logic PCLK,
  input  logic PRESETn,
  input  logic interrupt_low,
  input  logic interrupt_high,
  output logic PREADY
);

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) PREADY <= 1'b0;
    else          PREADY <= interrupt_low || interrupt_high;
  end

endmodule
