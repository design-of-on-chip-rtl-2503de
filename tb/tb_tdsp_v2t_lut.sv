// Testbench of the voltage-to-temperature table: every one of the 256 codes
// is checked against 2*code - 27 clipped to +127, including the four
// code/temperature pairs of the reference simulation, and the one-cycle
// latency and valid flag are checked.
`timescale 1ns/1ps
module tb_tdsp_v2t_lut;
  logic       PCLK = 1'b0, PRESETn = 1'b0;
  logic [7:0] adc_code = '0;
  logic       adc_valid = 1'b0;
  logic signed [7:0] real_temp;
  logic       real_valid;
  int checks = 0, failures = 0;

  tdsp_v2t_lut dut (.*);

  always #31.25 PCLK = ~PCLK;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int expected(input int code);
    int t = 2 * code - 27;
    return (t > 127) ? 127 : t;
  endfunction

  initial begin : watchdog
    repeat (2000) @(posedge PCLK);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge PCLK);
    #1 check(real_temp == 0 && !real_valid, "reset state");
    @(negedge PCLK) PRESETn = 1'b1;
    for (int c = 0; c < 256; c++) begin
      @(negedge PCLK) adc_code = 8'(c); adc_valid = c[0];
      @(posedge PCLK); #1;
      check(int'(real_temp) == expected(c),
            $sformatf("code %0d -> %0d, expected %0d", c, real_temp, expected(c)));
      check(real_valid == c[0], "valid follows with one cycle latency");
    end
    // Pairs printed in the reference simulation.
    begin
      int codes[4] = '{9, 37, 43, 50};
      int temps[4] = '{-9, 47, 59, 73};
      foreach (codes[i]) begin
        @(negedge PCLK) adc_code = 8'(codes[i]);
        @(posedge PCLK); #1;
        check(int'(real_temp) == temps[i], $sformatf("code %0d", codes[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
