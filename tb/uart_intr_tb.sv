// uart_intr_tb: self-checking test of the interrupt block.
//
// Random IER values and source conditions are applied every clock, along
// with random THR writes and IIR reads, while the THR-empty line is
// toggled. A model in the testbench keeps its own THRE-pending state
// (dropped by a THR write, else raised when THR becomes empty or when
// ETHRE is switched on while it is empty, else dropped by an IIR read
// that reported THRE) and
// computes the expected identification with the priority
// line status > data available > THR empty. The IIR code and irq are
// compared each clock. Each source must have been reported at least once.
module uart_intr_tb
  import uart_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  ier_t ier = '0;
  logic rls_cond = 0, rda_cond = 0, thr_empty = 1, thr_write = 0, iir_read = 0;
  iir_id_e iir_id;
  logic irq;
  int checks = 0, failures = 0;
  int seen_rls = 0, seen_rda = 0, seen_thre = 0, seen_none = 0;
  bit pend = 0, empty_q = 1, ethre_q = 0;

  uart_intr dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [3:0] expect_id();
    if (ier.erls && rls_cond) return 4'b0110;
    if (ier.erbi && rda_cond) return 4'b0100;
    if (ier.ethre && pend)    return 4'b0010;
    return 4'b0001;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      logic [3:0] e;
      @(negedge clk);
      ier       = ier_t'($urandom_range(0, 7));
      if ($urandom_range(0, 9) == 0) ier = '0;
      rls_cond  = ($urandom_range(0, 5) == 0);
      rda_cond  = ($urandom_range(0, 3) == 0);
      if ($urandom_range(0, 7) == 0) thr_empty = !thr_empty;
      thr_write = ($urandom_range(0, 15) == 0);
      iir_read  = ($urandom_range(0, 7) == 0);
      #1;
      e = expect_id();
      check(iir_id == e, $sformatf("iir %b expected %b", iir_id, e));
      check(irq == (e != 4'b0001), "irq");
      case (e)
        4'b0110: seen_rls++;
        4'b0100: seen_rda++;
        4'b0010: seen_thre++;
        default: seen_none++;
      endcase
      // model update at the edge
      @(posedge clk);
      if (thr_write) pend = 0;
      else if ((thr_empty && !empty_q) || (ier.ethre && !ethre_q && thr_empty)) pend = 1;
      else if (iir_read && e == 4'b0010) pend = 0;
      empty_q = thr_empty;
      ethre_q = ier.ethre;
    end
    check(seen_rls > 0 && seen_rda > 0 && seen_thre > 0 && seen_none > 0,
          $sformatf("sources seen rls %0d rda %0d thre %0d none %0d", seen_rls, seen_rda, seen_thre, seen_none));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
