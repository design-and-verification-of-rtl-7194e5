// uart_brg_tb: self-checking test of the baud rate generator.
//
// For a series of divisors (1, 2, 3, 7, 16, 255, 1000 and 65535, the top of the
// 16-bit range) it checks
// that the first bclk pulse comes exactly `divisor` clocks after the new
// divisor is applied, that every following gap is exactly `divisor`
// clocks and that each pulse lasts one clock. Divisor 0 must give no
// pulses at all. A watchdog ends the run if it hangs.
module uart_brg_tb;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] divisor = '0;
  logic        bclk;
  int          checks = 0, failures = 0;

  uart_brg dut (.clk, .rst_n, .divisor, .bclk);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // apply a divisor and measure n periods
  task automatic run_div(input int unsigned d, input int n);
    int unsigned gap;
    @(negedge clk) divisor = 16'(d);
    gap = 0;
    // first pulse: d clocks after the divisor appears (allow registered pulse)
    for (int p = 0; p < n; p++) begin
      gap = 0;
      do begin
        @(posedge clk); #1;
        gap++;
      end while (!bclk && gap < d + 5);
      check(bclk, $sformatf("div %0d: pulse %0d missing", d, p));
      if (p == 0) check(gap == d + 1, $sformatf("div %0d: first pulse after %0d clocks", d, gap));
      else        check(gap == d, $sformatf("div %0d: period %0d", d, gap));
      if (d > 1) begin
        @(posedge clk); #1;
        check(!bclk, $sformatf("div %0d: pulse wider than one clock", d));
        gap = 1;
        // continue counting from here for the next gap
        do begin
          @(posedge clk); #1;
          gap++;
        end while (!bclk && gap < d + 5);
        check(bclk && gap == d, $sformatf("div %0d: period %0d", d, gap));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // divisor 0: silent
    for (int i = 0; i < 200; i++) begin
      @(posedge clk); #1;
      check(!bclk, "divisor 0 must not pulse");
    end
    run_div(1, 4);
    run_div(2, 4);
    run_div(3, 4);
    run_div(7, 4);
    run_div(16, 3);
    run_div(255, 2);
    run_div(1000, 2);
    run_div(65535, 1);
    // back to 0
    @(negedge clk) divisor = '0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); #1;
      check(!bclk, "divisor 0 must not pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
