// Testbench of the function controller: PREADY must be the OR of the two
// interrupts, one cycle later, and low in reset.
`timescale 1ns/1ps
module tb_tdsp_function_controller;
  logic PCLK = 1'b0, PRESETn = 1'b0;
  logic interrupt_low = 1'b0, interrupt_high = 1'b0, PREADY;
  int checks = 0, failures = 0;

  tdsp_function_controller dut (.*);

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
    @(negedge PCLK) interrupt_high = 1'b1;
    @(posedge PCLK); #1 check(!PREADY, "low in reset");
    @(negedge PCLK) PRESETn = 1'b1;
    for (int i = 0; i < 200; i++) begin
      bit lo, hi, prev;
      lo = (i < 4) ? i[0] : 1'($urandom);
      hi = (i < 4) ? i[1] : 1'($urandom);
      @(negedge PCLK) prev = PREADY; interrupt_low = lo; interrupt_high = hi;
      #1 check(PREADY == prev, "PREADY holds until the clock edge");
      @(posedge PCLK); #1;
      check(PREADY == (lo | hi), $sformatf("PREADY %0d for l/h %0d%0d", PREADY, lo, hi));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
