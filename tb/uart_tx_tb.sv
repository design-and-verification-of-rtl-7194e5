// uart_tx_tb: self-checking test of the transmitter shift register.
//
// The testbench plays the transmitter FIFO (a queue) and the baud rate
// generator (a bclk pulse every DIV clocks). For every LCR format (word
// length 5..8, 1 or 2 stop bits, parity off / odd / even / stick 0 /
// stick 1) it sends random characters back to back and compares TXD at
// every bclk pulse with a frame built independently here: bit k of the
// frame must be on the line for exactly pulses 16k+1 .. 16k+16 after the
// pulse that took the character. It also checks the frame length (the
// next character is taken exactly 16 * bits pulses later), the busy flag,
// the idle level and break control (TXD forced to 0).
module uart_tx_tb
  import uart_pkg::*;
;
  localparam int DIV = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bclk = 1'b0;
  lcr_t lcr = '0;
  logic tx_empty;
  logic [7:0] tx_data;
  logic tx_pop, txd, busy;
  int checks = 0, failures = 0;
  logic [7:0] q[$];
  int div_cnt = 0;
  int frames = 0;

  uart_tx dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    div_cnt <= (div_cnt == DIV - 1) ? 0 : div_cnt + 1;
    bclk    <= (div_cnt == DIV - 1);
  end

  assign tx_empty = (q.size() == 0);
  assign tx_data  = tx_empty ? 8'h00 : q[0];

  always @(posedge clk) if (tx_pop) void'(q.pop_front());

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // frame bits (start, data LSB first, parity) and the stop length in pulses
  function automatic int build_frame(input logic [7:0] d, input lcr_t f,
                                     output bit bits[$], output int stop_pulses);
    int n;
    bit p;
    n = 5 + int'(f.wls);
    bits.delete();
    bits.push_back(0);
    p = 0;
    for (int i = 0; i < n; i++) begin
      bits.push_back(d[i]);
      p ^= d[i];
    end
    if (f.pen) begin
      if (f.sp)       bits.push_back(!f.eps);
      else if (f.eps) bits.push_back(p);        // even: total ones even
      else            bits.push_back(!p);       // odd
    end
    stop_pulses = !f.stb ? 16 : (n == 5 ? 24 : 32);
    return 16 * bits.size() + stop_pulses;
  endfunction

  // wait for a bclk pulse and return txd sampled in that clock
  task automatic next_pulse();
    do @(posedge clk); while (!bclk);
  endtask

  task automatic send_burst(input lcr_t f, input int n);
    logic [7:0] chars[$];
    for (int i = 0; i < n; i++) chars.push_back(8'($urandom));
    @(negedge clk);
    lcr = f;
    foreach (chars[i]) q.push_back(chars[i]);
    for (int c = 0; c < n; c++) begin
      bit bits[$];
      int stop_p, total;
      total = build_frame(chars[c], f, bits, stop_p);
      // wait for the load
      if (c == 0) begin
        int guard = 0;
        do begin
          @(posedge clk);
          guard++;
        end while (!tx_pop && guard < 100);
        check(tx_pop && bclk, "character taken on a bclk pulse");
      end
      // now at the load pulse; walk through the frame
      for (int j = 1; j <= total; j++) begin
        next_pulse();
        if (j <= 16 * bits.size())
          check(txd == bits[(j - 1) / 16], $sformatf("fmt %h char %h pulse %0d: txd %b", f, chars[c], j, txd));
        else
          check(txd == 1'b1, $sformatf("fmt %h stop bit pulse %0d", f, j));
        check(busy, "busy during frame");
        if (j < total) check(!tx_pop, "no load inside a frame");
      end
      // the last stop pulse loads the next character (if any)
      if (c < n - 1) check(tx_pop, $sformatf("next character taken right after %0d pulses", total));
      frames++;
    end
    // idle afterwards
    next_pulse();
    next_pulse();
    check(txd == 1'b1 && !busy, "line idle high after the burst");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);
    check(txd == 1'b1 && !busy, "idle after reset");
    for (int wls = 0; wls < 4; wls++)
      for (int stb = 0; stb < 2; stb++)
        for (int par = 0; par < 5; par++) begin
          lcr_t f;
          f = '0;
          f.wls = 2'(wls);
          f.stb = 1'(stb);
          f.pen = (par != 0);
          f.eps = (par == 2 || par == 4);
          f.sp  = (par >= 3);
          send_burst(f, 3);
        end
    // break control
    @(negedge clk);
    lcr.brk = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(txd == 1'b0, "break holds TXD low");
    @(negedge clk);
    lcr.brk = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(txd == 1'b1, "TXD high after break");
    check(frames == 120, $sformatf("%0d frames sent", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
