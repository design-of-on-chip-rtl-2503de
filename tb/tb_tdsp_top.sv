// End-to-end testbench of the TDSP at its default parameters.
//
// The testbench plays both the ADC (driving INPUTADC) and the APB host. It
// first replays the reference scenario of the design at 16 MHz: reset with
// code 1 for 2000 ns, then codes 9, 37 and 43 for 2000 ns each, then code 50
// while the host writes a reference of 60 C (PWDATA = 32'h0000_003c), and
// compares PRDATA/PREADY at the end of each phase with the words the
// reference simulation prints. It then runs random ADC codes, random host
// writes and resets against a cycle-exact model written here from the
// specification: the ADC is sampled on every 8th clock, temp = 2*code - 27
// (clipped to +127), low below 0 C, high above the reference (50 C before
// one is written), PRDATA = {8'h00, sign, |temp|, 8 x low, 8 x high} and
// PREADY = low | high, four clocks after the sampling edge.
// Each mechanism (low, average and high range, host write, a write that
// changes the class, table saturation, reset during operation, the quiet
// time before the first sample) is counted; one that never occurs fails.
`timescale 1ns/1ps
module tb_tdsp_top;
  logic        PCLK = 1'b0, PRESETn = 1'b0;
  logic        PSEL = 1'b0, PENABLE = 1'b0, PWRITE = 1'b0;
  logic [31:0] PWDATA = '0;
  logic [7:0]  INPUTADC = 8'd1;
  logic [31:0] PRDATA;
  logic        PREADY;
  int checks = 0, failures = 0;

  tdsp_top dut (.*);

  always #31.25 PCLK = ~PCLK;   // 16 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  localparam int MAX_CYCLES = 20000;
  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge PCLK);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  // State after each rising edge, kept in small shift histories.
  int  n_edge;                        // edges since reset release
  int  m_code  [5];                   // sampled code after edge n-k, k = 0..4
  bit  m_cval  [5];
  int  m_ref   [5];
  bit  m_rval  [5];

  function automatic int temp_of(input int code);
    int t = 2 * code - 27;
    return (t > 127) ? 127 : t;
  endfunction

  // 0 none, 1 low, 2 average, 3 high
  function automatic int class_of(input int code, input bit cval, input int ref_c, input bit rval);
    int t, lim;
    if (!cval) return 0;
    t   = temp_of(code);
    lim = rval ? ref_c : 50;
    if (t < 0)   return 1;
    if (t > lim) return 3;
    return 2;
  endfunction

  function automatic logic [31:0] word_of(input int code, input bit cval, input int cls);
    int t;
    logic [31:0] w;
    t = cval ? temp_of(code) : 0;
    w = '0;
    w[23]    = (t < 0);
    w[22:16] = 7'((t < 0) ? -t : t);
    w[15:8]  = (cls == 1) ? 8'hff : 8'h00;
    w[7:0]   = (cls == 3) ? 8'hff : 8'h00;
    return w;
  endfunction

  // mechanism counters
  int n_low, n_avg, n_high, n_write, n_write_changed, n_saturated, n_reset_run, n_quiet;
  bit model_on;

  always @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      n_edge = 0;
      for (int k = 0; k < 5; k++) begin
        m_code[k] = 0; m_cval[k] = 0; m_ref[k] = 0; m_rval[k] = 0;
      end
    end else begin
      int cls, cls_default;
      logic [31:0] exp_w;
      for (int k = 4; k > 0; k--) begin
        m_code[k] = m_code[k-1]; m_cval[k] = m_cval[k-1];
        m_ref[k]  = m_ref[k-1];  m_rval[k] = m_rval[k-1];
      end
      n_edge++;
      if (n_edge % 8 == 0) begin m_code[0] = int'(INPUTADC); m_cval[0] = 1'b1; end
      if (PSEL && PENABLE && PWRITE) begin
        m_ref[0] = int'($signed(PWDATA[7:0])); m_rval[0] = 1'b1;
      end
      // Outputs after this edge: code after edge n-4, reference after n-3.
      cls   = class_of(m_code[4], m_cval[4], m_ref[3], m_rval[3]);
      exp_w = word_of(m_code[4], m_cval[4], cls);
      #1;
      if (model_on) begin
        check(PRDATA == exp_w, $sformatf("PRDATA %h expected %h (code %0d)", PRDATA, exp_w, m_code[4]));
        check(PREADY == (cls == 1 || cls == 3), $sformatf("PREADY %0d for class %0d", PREADY, cls));
        cls_default = class_of(m_code[4], m_cval[4], 0, 1'b0);
        case (cls)
          0: n_quiet++;
          1: n_low++;
          2: n_avg++;
          3: n_high++;
          default: ;
        endcase
        if (m_rval[3] && cls != cls_default) n_write_changed++;
        if (m_cval[4] && 2 * m_code[4] - 27 > 127) n_saturated++;
      end
    end
  end

  always @(posedge PCLK) if (PRESETn && PSEL && PENABLE && PWRITE) n_write++;

  // ---------------------------------------------------------------- stimulus
  task automatic wait_ns(input int ns);
    repeat (ns * 16 / 1000) @(posedge PCLK);   // 62.5 ns per cycle
  endtask

  task automatic apb_write(input logic [31:0] data);
    @(negedge PCLK) PSEL = 1'b1; PENABLE = 1'b0; PWRITE = 1'b1; PWDATA = data;
    @(negedge PCLK) PENABLE = 1'b1;
    @(negedge PCLK) PSEL = 1'b0; PENABLE = 1'b0; PWRITE = 1'b0; PWDATA = $urandom;
  endtask

  initial begin
    model_on = 1'b1;
    n_low = 0; n_avg = 0; n_high = 0; n_write = 0; n_write_changed = 0;
    n_saturated = 0; n_reset_run = 0; n_quiet = 0;

    // Reference scenario.
    wait_ns(2000);
    check(PRDATA == 32'h0 && !PREADY, "outputs zero in reset");
    @(negedge PCLK) PRESETn = 1'b1; INPUTADC = 8'd9;
    wait_ns(2000);
    check(PRDATA == 32'h0089_ff00 && PREADY, $sformatf("code 9: -9 C, low interrupt (%h)", PRDATA));
    @(negedge PCLK) INPUTADC = 8'd37;
    wait_ns(2000);
    check(PRDATA == 32'h002f_0000 && !PREADY, $sformatf("code 37: 47 C, no interrupt (%h)", PRDATA));
    @(negedge PCLK) INPUTADC = 8'd43;
    wait_ns(2000);
    check(PRDATA == 32'h003b_00ff && PREADY, $sformatf("code 43: 59 C, high interrupt (%h)", PRDATA));
    @(negedge PCLK) INPUTADC = 8'd50;
    PSEL = 1'b1; PENABLE = 1'b1; PWRITE = 1'b1; PWDATA = 32'h0000_003c;
    wait_ns(2000);
    check(PRDATA == 32'h0049_00ff && PREADY, $sformatf("code 50, reference 60 C: 73 C high (%h)", PRDATA));
    @(negedge PCLK) PSEL = 1'b0; PENABLE = 1'b0; PWRITE = 1'b0;

    // The reference now moves 59 C into the average range.
    @(negedge PCLK) INPUTADC = 8'd43;
    repeat (16) @(posedge PCLK);
    check(PRDATA == 32'h003b_0000 && !PREADY, $sformatf("59 C under a 60 C reference (%h)", PRDATA));

    // Latency: a code change right after a sampling edge appears 12 edges later.
    begin
      int wait_edges;
      @(posedge PCLK); #2;
      while (n_edge % 8 != 0) begin @(posedge PCLK); #2; end
      @(negedge PCLK) INPUTADC = 8'd30;     // 33 C
      wait_edges = 0;
      while (PRDATA[22:16] != 7'd33 && wait_edges < 40) begin
        @(posedge PCLK); #2; wait_edges++;
      end
      check(wait_edges == 12, $sformatf("code-to-PRDATA latency %0d edges, expected 12", wait_edges));
    end

    // Saturation of the table.
    @(negedge PCLK) INPUTADC = 8'd200;
    repeat (16) @(posedge PCLK);
    check(PRDATA == 32'h007f_00ff, $sformatf("code 200 reads +127 C (%h)", PRDATA));

    // Random operation with host writes and resets.
    for (int i = 0; i < 1500; i++) begin
      @(negedge PCLK);
      if ($urandom % 6 == 0) INPUTADC = 8'($urandom % 100);
      if ($urandom % 200 == 0) apb_write({24'($urandom), 8'(20 + $urandom % 60)});
      if ($urandom % 500 == 0) begin
        @(negedge PCLK) PRESETn = 1'b0;
        n_reset_run++;
        #1 check(PRDATA == 32'h0 && !PREADY, "reset clears the outputs");
        @(negedge PCLK) PRESETn = 1'b1;
      end
    end
    if (n_reset_run == 0) begin
      @(negedge PCLK) PRESETn = 1'b0;
      n_reset_run++;
      #1 check(PRDATA == 32'h0 && !PREADY, "reset clears the outputs");
      @(negedge PCLK) PRESETn = 1'b1;
      repeat (40) @(posedge PCLK);
    end

    $display("mechanisms: low %0d average %0d high %0d writes %0d write-changed-class %0d saturated %0d resets %0d quiet %0d",
             n_low, n_avg, n_high, n_write, n_write_changed, n_saturated, n_reset_run, n_quiet);
    check(n_low > 0, "low range seen");
    check(n_avg > 0, "average range seen");
    check(n_high > 0, "high range seen");
    check(n_write > 0, "host write seen");
    check(n_write_changed > 0, "reference changed a class");
    check(n_saturated > 0, "table saturation seen");
    check(n_reset_run > 0, "reset during operation seen");
    check(n_quiet > 0, "quiet time before first sample seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
