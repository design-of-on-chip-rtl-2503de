// Testbench of the programmable watchdog: random temperatures and limits are
// classed against a reference model (low below 0 C, high above the reference
// once written and above 50 C before), with one cycle of latency, and the
// temperatures of the reference simulation are checked by name.
`timescale 1ns/1ps
module tb_tdsp_watchdog;
  logic PCLK = 1'b0, PRESETn = 1'b0;
  logic signed [7:0] real_temp = '0, reftemp = '0, temp_value;
  logic real_valid = 1'b0, ref_valid = 1'b0;
  logic max_temp, low_temp, average_temp;
  int checks = 0, failures = 0;

  tdsp_watchdog dut (.*);

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

  task automatic apply(input int t, input bit v, input int r, input bit rv);
    int lim;
    bit e_low, e_high, e_avg;
    @(negedge PCLK);
    real_temp = 8'(t); real_valid = v; reftemp = 8'(r); ref_valid = rv;
    lim    = rv ? r : 50;
    e_low  = v && (t < 0);
    e_high = v && !e_low && (t > lim);
    e_avg  = v && !e_low && !e_high;
    @(posedge PCLK); #1;
    check(temp_value == (v ? 8'(t) : 8'(0)), $sformatf("temp_value %0d for %0d", temp_value, t));
    check({low_temp, average_temp, max_temp} == {e_low, e_avg, e_high},
          $sformatf("t=%0d v=%0d ref=%0d/%0d got l/a/h=%0d%0d%0d exp %0d%0d%0d",
                    t, v, r, rv, low_temp, average_temp, max_temp, e_low, e_avg, e_high));
  endtask

  initial begin
    repeat (2) @(posedge PCLK);
    @(negedge PCLK) PRESETn = 1'b1;
    apply(-9, 1, 0, 0);  check(low_temp, "-9 C is low");
    apply(47, 1, 0, 0);  check(average_temp, "47 C is average");
    apply(59, 1, 0, 0);  check(max_temp, "59 C is high before a reference");
    apply(73, 1, 60, 1); check(max_temp, "73 C is high above a 60 C reference");
    apply(59, 1, 60, 1); check(average_temp, "59 C is average under a 60 C reference");
    apply(50, 1, 0, 0);  check(average_temp, "50 C is the top of the default range");
    apply(51, 1, 0, 0);  check(max_temp, "51 C is high by default");
    apply(0, 1, 0, 0);   check(average_temp, "0 C is not low");
    apply(-1, 1, 0, 0);  check(low_temp, "-1 C is low");
    apply(-100, 0, 0, 0); check(!low_temp && !max_temp && !average_temp, "no class without valid");
    for (int i = 0; i < 400; i++)
      apply($signed(8'($urandom)), ($urandom % 8) != 0, $signed(8'($urandom)), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
