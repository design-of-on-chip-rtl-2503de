// Testbench of the sample counter: after reset the strobe must come on the
// 8th rising edge and then on every 8th edge, one cycle wide; a reset in
// the middle of a period must restart the count.
`timescale 1ns/1ps
module tb_tdsp_counter;
  logic PCLK = 1'b0, PRESETn = 1'b0;
  logic sample_tick;
  int checks = 0, failures = 0;

  tdsp_counter dut (.PCLK, .PRESETn, .sample_tick);

  always #31.25 PCLK = ~PCLK;   // 16 MHz

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
    int ticks, edge_no;
    repeat (3) @(posedge PCLK);
    check(sample_tick == 1'b0, "no strobe in reset");
    @(negedge PCLK) PRESETn = 1'b1;
    // Edge n (counted from 1 after reset release): expected strobe while
    // count == 7, i.e. after edges 7, 15, 23, ...
    ticks = 0;
    for (edge_no = 1; edge_no <= 80; edge_no++) begin
      @(posedge PCLK); #1;
      check(sample_tick == ((edge_no % 8) == 7), $sformatf("strobe at edge %0d", edge_no));
      if (sample_tick) ticks++;
    end
    check(ticks == 10, $sformatf("10 strobes in 80 cycles, got %0d", ticks));
    // Reset in mid period, then the first strobe again 7 edges later.
    repeat (3) @(posedge PCLK);
    @(negedge PCLK) PRESETn = 1'b0;
    #1 check(sample_tick == 1'b0, "reset clears count");
    @(negedge PCLK) PRESETn = 1'b1;
    for (edge_no = 1; edge_no <= 16; edge_no++) begin
      @(posedge PCLK); #1;
      check(sample_tick == ((edge_no % 8) == 7), $sformatf("after re-reset, edge %0d", edge_no));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
