// Testbench of the interrupt generator: the temperature and the two
// interrupt lines must follow the watchdog's outputs one cycle later, and
// reset must clear them.
`timescale 1ns/1ps
module tb_tdsp_interrupt_gen;
  logic PCLK = 1'b0, PRESETn = 1'b0;
  logic signed [7:0] temp_value = '0, temp_out;
  logic max_temp = 1'b0, low_temp = 1'b0;
  logic interrupt_low, interrupt_high;
  int checks = 0, failures = 0;

  tdsp_interrupt_gen dut (.*);

  always #31.25 PCLK = ~PCLK;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge PCLK);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge PCLK);
    #1 check(temp_out == 0 && !interrupt_low && !interrupt_high, "reset state");
    @(negedge PCLK) PRESETn = 1'b1;
    for (int i = 0; i < 300; i++) begin
      logic signed [7:0] t, prev_t;
      logic prev_l;
      int cls;
      t   = 8'($urandom);
      cls = $urandom % 3;   // 0 average, 1 low, 2 high
      @(negedge PCLK);
      prev_t = temp_out; prev_l = interrupt_low;
      temp_value = t; low_temp = (cls == 1); max_temp = (cls == 2);
      #1 check(temp_out == prev_t && interrupt_low == prev_l, "outputs hold until the clock edge");
      @(posedge PCLK); #1;
      check(temp_out == t, $sformatf("temp_out %0d exp %0d", temp_out, t));
      check(interrupt_low == (cls == 1) && interrupt_high == (cls == 2),
            $sformatf("interrupts l/h %0d%0d for class %0d", interrupt_low, interrupt_high, cls));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
