// Testbench of the output converter: every temperature from -127 to +127
// with every interrupt combination is packed and compared with the word
// built field by field, and the words of the reference simulation are
// checked literally.
`timescale 1ns/1ps
module tb_tdsp_output_converter;
  logic PCLK = 1'b0, PRESETn = 1'b0;
  logic signed [7:0] temp_out = '0;
  logic interrupt_low = 1'b0, interrupt_high = 1'b0;
  logic [31:0] PRDATA;
  int checks = 0, failures = 0;

  tdsp_output_converter dut (.*);

  always #31.25 PCLK = ~PCLK;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge PCLK);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int t, input bit lo, input bit hi);
    @(negedge PCLK) temp_out = 8'(t); interrupt_low = lo; interrupt_high = hi;
    @(posedge PCLK); #1;
  endtask

  initial begin
    repeat (2) @(posedge PCLK);
    #1 check(PRDATA == 32'h0, "reset word is zero");
    @(negedge PCLK) PRESETn = 1'b1;
    for (int t = -127; t <= 127; t++) begin
      bit lo, hi;
      lo = 1'($urandom); hi = 1'($urandom);
      apply(t, lo, hi);
      check(PRDATA[31:24] == 8'h00, "upper byte zero");
      check(PRDATA[23] == (t < 0), $sformatf("sign of %0d", t));
      check(int'(PRDATA[22:16]) == ((t < 0) ? -t : t), $sformatf("magnitude of %0d: %0d", t, PRDATA[22:16]));
      check(PRDATA[15:8] == (lo ? 8'hff : 8'h00) && PRDATA[7:0] == (hi ? 8'hff : 8'h00),
            $sformatf("interrupt bytes %h", PRDATA[15:0]));
    end
    apply(73, 0, 1); check(PRDATA == 32'h0049_00ff, $sformatf("73 C high: %h", PRDATA));
    apply(59, 0, 1); check(PRDATA == 32'h003b_00ff, $sformatf("59 C high: %h", PRDATA));
    apply(47, 0, 0); check(PRDATA == 32'h002f_0000, $sformatf("47 C: %h", PRDATA));
    apply(-9, 1, 0); check(PRDATA == 32'h0089_ff00, $sformatf("-9 C low: %h", PRDATA));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
