// Testbench of the interface register: ADC codes are taken only on the
// sample strobe, the reference only on a full APB write (PSEL, PENABLE and
// PWRITE high), and the valid flags behave as specified.
`timescale 1ns/1ps
module tb_tdsp_interface_reg;
  logic        PCLK = 1'b0, PRESETn = 1'b0;
  logic        PSEL = 1'b0, PENABLE = 1'b0, PWRITE = 1'b0;
  logic [31:0] PWDATA = '0;
  logic [7:0]  INPUTADC = '0;
  logic        sample_tick = 1'b0;
  logic [7:0]  adc_code, reftemp;
  logic        adc_valid, ref_valid;
  int checks = 0, failures = 0;

  tdsp_interface_reg dut (.*);

  always #31.25 PCLK = ~PCLK;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge PCLK);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected state, kept by the testbench.
  logic [7:0] exp_adc, exp_ref;
  bit         exp_adc_v, exp_ref_v;

  task automatic cycle(input bit tick, input bit sel, input bit en, input bit wr,
                       input logic [31:0] wdata, input logic [7:0] adc);
    @(negedge PCLK);
    sample_tick = tick; PSEL = sel; PENABLE = en; PWRITE = wr;
    PWDATA = wdata; INPUTADC = adc;
    @(posedge PCLK); #1;
    if (tick) begin exp_adc = adc; exp_adc_v = 1'b1; end
    if (sel && en && wr) begin exp_ref = wdata[7:0]; exp_ref_v = 1'b1; end
    check(adc_code == exp_adc && adc_valid == exp_adc_v,
          $sformatf("adc %0d/%0d exp %0d/%0d", adc_code, adc_valid, exp_adc, exp_adc_v));
    check(reftemp == exp_ref && ref_valid == exp_ref_v,
          $sformatf("ref %0h/%0d exp %0h/%0d", reftemp, ref_valid, exp_ref, exp_ref_v));
  endtask

  initial begin
    exp_adc = '0; exp_ref = '0; exp_adc_v = 1'b0; exp_ref_v = 1'b0;
    repeat (2) @(posedge PCLK);
    @(negedge PCLK) PRESETn = 1'b1;
    // Input changes without strobe: not taken.
    cycle(0, 0, 0, 0, 32'h0, 8'd37);
    cycle(1, 0, 0, 0, 32'h0, 8'd9);
    cycle(0, 0, 0, 0, 32'h0, 8'd50);
    // APB setup phase only (PSEL without PENABLE): no write.
    cycle(0, 1, 0, 1, 32'h0000_003c, 8'd50);
    // Read access: no write.
    cycle(0, 1, 1, 0, 32'h0000_0011, 8'd50);
    // Full write.
    cycle(0, 1, 0, 1, 32'h0000_003c, 8'd50);
    cycle(0, 1, 1, 1, 32'h0000_003c, 8'd50);
    cycle(0, 0, 0, 0, 32'hffff_ff00, 8'd50);
    // Random traffic obeying APB (PENABLE only with PSEL).
    for (int i = 0; i < 300; i++) begin
      bit sel, en;
      sel = 1'($urandom);
      en  = sel & 1'($urandom);
      cycle(1'($urandom), sel, en, 1'($urandom), $urandom, 8'($urandom));
    end
    // Reset clears everything.
    @(negedge PCLK) PRESETn = 1'b0;
    #1;
    check(adc_code == 0 && !adc_valid && reftemp == 0 && !ref_valid, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
