// uart_fifo_tb: self-checking test of the UART FIFO.
//
// A queue in the testbench is the reference. Phase 1 fills the FIFO to
// its depth, checks full and the overflow flag of one more push, then
// drains it in order. Phase 2 runs random push/pop traffic, with a few
// clears, in FIFO mode; phase 3 does the same in one-word mode
// (fifo_en = 0), where the FIFO holds at most one word. Each clock the
// head word, count, empty, full and overflow are compared with the model.
module uart_fifo_tb;
  localparam int W = 8;
  localparam int D = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic fifo_en = 1'b1, clear = 1'b0, push = 1'b0, pop = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic empty, full, overflow;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  bit exp_ovf;

  uart_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // one clock of traffic, model updated at the edge
  task automatic step(input bit do_push, input bit do_pop, input bit do_clr);
    int cap;
    cap = fifo_en ? D : 1;
    @(negedge clk);
    push = do_push; pop = do_pop; clear = do_clr; wdata = W'($urandom);
    @(posedge clk);
    #1;
    exp_ovf = 0;
    if (do_clr) q.delete();
    else begin
      bit popped;
      popped = 0;
      if (do_pop && q.size() > 0) begin
        void'(q.pop_front());
        popped = 1;
      end
      if (do_push) begin
        if (q.size() < cap) q.push_back(wdata);
        else exp_ovf = 1;
      end
    end
    check(overflow == exp_ovf, "overflow flag");
    check(count == q.size(), $sformatf("count %0d, expected %0d", count, q.size()));
    check(empty == (q.size() == 0), "empty flag");
    check(full == (q.size() == cap), "full flag");
    if (q.size() > 0) check(rdata == q[0], $sformatf("head %h, expected %h", rdata, q[0]));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: fill, overflow, drain
    for (int i = 0; i < D; i++) step(1, 0, 0);
    check(full, "full after DEPTH pushes");
    step(1, 0, 0);
    check(overflow, "push into full FIFO flags overflow");
    step(1, 1, 0);   // simultaneous push/pop on full FIFO
    for (int i = 0; i < D; i++) step(0, 1, 0);
    check(empty, "empty after draining");
    step(0, 1, 0);   // pop of empty FIFO is ignored
    // phase 2: random traffic in FIFO mode
    for (int i = 0; i < 4000; i++)
      step($urandom_range(0, 99) < 55, $urandom_range(0, 99) < 45, $urandom_range(0, 999) < 5);
    // phase 3: one-word mode
    step(0, 0, 1);
    fifo_en = 1'b0;
    for (int i = 0; i < 2000; i++)
      step($urandom_range(0, 1), $urandom_range(0, 1), 0);
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
