// uart_duplex_tb: end-to-end test of the two-UART design.
//
// Two Wishbone masters in the testbench drive the host ports of UART1 and
// UART2; a switch in the testbench joins the serial pins for each test:
//   loopback     each UART's TXD to its own RXD,
//   half duplex  UART1 -> UART2, then UART2 -> UART1,
//   full duplex  both send at the same time, crosswise,
//   broadcast    UART1's TXD drives both receivers,
//   line         the testbench drives a receiver's RXD bit by bit.
// Characters are random; every received character is compared with the
// one sent. The test also makes each line and FIFO mechanism happen and
// counts it: parity error (sender and receiver disagree on parity),
// framing error (stop bit driven 0), break (LCR break control), overrun
// in FIFO mode and in character mode, FIFO clear through FCR, receiver
// trigger level interrupt, THRE interrupt, line status interrupt, a
// divisor change through DLAB, and frame timing (16 * divisor clocks per
// bit). A mechanism that never happened counts as a failure.
// The design runs with its default parameters (FIFO depth 16). The four
// arrangements are the test cases of the article; the error and interrupt
// scenarios are this testbench's additions.
module uart_duplex_tb
  import uart_pkg::*;
;
  logic clk = 1'b0, rst_n = 1'b0;
  logic       wb_cyc [2];
  logic       wb_stb [2];
  logic       wb_we  [2];
  logic [2:0] wb_adr [2];
  logic [7:0] wb_wd  [2];
  logic [7:0] wb_rd  [2];
  logic       wb_ack [2];
  logic       irq    [2];
  logic       txd    [2];
  logic       rxd    [2];
  logic       line   [2];     // testbench-driven serial lines
  int         route  [2];     // 0 crosswise, 1 own TXD, 2 testbench line, 3 UART1's TXD
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  int divisor = 1;

  // mechanism counters
  int n_loop = 0, n_half = 0, n_full = 0, n_bcast = 0;
  int n_pe = 0, n_fe = 0, n_bi = 0, n_oe_fifo = 0, n_oe_char = 0;
  int n_clear = 0, n_trig = 0, n_thre = 0, n_rls = 0, n_baud = 0, n_timing = 0;

  uart_duplex dut (
    .clk, .rst_n,
    .wb1_cyc_i(wb_cyc[0]), .wb1_stb_i(wb_stb[0]), .wb1_we_i(wb_we[0]),
    .wb1_adr_i(wb_adr[0]), .wb1_dat_i(wb_wd[0]), .wb1_dat_o(wb_rd[0]),
    .wb1_ack_o(wb_ack[0]), .int1_o(irq[0]), .txd1_o(txd[0]), .rxd1_i(rxd[0]),
    .wb2_cyc_i(wb_cyc[1]), .wb2_stb_i(wb_stb[1]), .wb2_we_i(wb_we[1]),
    .wb2_adr_i(wb_adr[1]), .wb2_dat_i(wb_wd[1]), .wb2_dat_o(wb_rd[1]),
    .wb2_ack_o(wb_ack[1]), .int2_o(irq[1]), .txd2_o(txd[1]), .rxd2_i(rxd[1])
  );

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      case (route[p])
        0:       rxd[p] = txd[1 - p];
        1:       rxd[p] = txd[p];
        2:       rxd[p] = line[p];
        default: rxd[p] = txd[0];
      endcase
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- Wishbone masters ----------------
  task automatic wb_write(input int p, input logic [2:0] a, input logic [7:0] d);
    @(negedge clk);
    wb_cyc[p] = 1; wb_stb[p] = 1; wb_we[p] = 1; wb_adr[p] = a; wb_wd[p] = d;
    do @(posedge clk); while (!wb_ack[p]);
    @(negedge clk);
    wb_cyc[p] = 0; wb_stb[p] = 0; wb_we[p] = 0;
  endtask

  task automatic wb_read(input int p, input logic [2:0] a, output logic [7:0] d);
    @(negedge clk);
    wb_cyc[p] = 1; wb_stb[p] = 1; wb_we[p] = 0; wb_adr[p] = a;
    do @(posedge clk); while (!wb_ack[p]);
    #1 d = wb_rd[p];
    @(negedge clk);
    wb_cyc[p] = 0; wb_stb[p] = 0;
  endtask

  task automatic set_divisor(input int p, input int d, input logic [7:0] lcr_v);
    wb_write(p, ADDR_LCR, 8'h80 | lcr_v);
    wb_write(p, ADDR_RBR_THR_DLL, 8'(d));
    wb_write(p, ADDR_IER_DLH, 8'(d >> 8));
    wb_write(p, ADDR_LCR, lcr_v);
  endtask

  task automatic send(input int p, input logic [7:0] q[$]);
    foreach (q[i]) wb_write(p, ADDR_RBR_THR_DLL, q[i]);
  endtask

  // read n characters, polling LSR; gives up after `limit` clocks
  task automatic receive(input int p, input int n, output logic [7:0] q[$], output logic [7:0] lsr_or);
    logic [7:0] lsr, d;
    longint unsigned t0;
    q.delete();
    lsr_or = '0;
    t0 = cyc;
    while (q.size() < n && cyc - t0 < 200 * 16 * divisor * 12) begin
      wb_read(p, ADDR_LSR, lsr);
      lsr_or |= lsr;
      if (lsr[0]) begin
        wb_read(p, ADDR_RBR_THR_DLL, d);
        q.push_back(d);
      end
    end
  endtask

  task automatic wait_idle(input int p);
    logic [7:0] lsr;
    do wb_read(p, ADDR_LSR, lsr); while (!lsr[6]);
  endtask

  task automatic compare(input logic [7:0] got[$], input logic [7:0] exp[$], input string what);
    check(got.size() == exp.size(), $sformatf("%s: %0d of %0d characters", what, got.size(), exp.size()));
    foreach (exp[i])
      if (i < got.size()) check(got[i] == exp[i], $sformatf("%s: char %0d got %h sent %h", what, i, got[i], exp[i]));
  endtask

  function automatic void random_chars(input int n, output logic [7:0] q[$]);
    q.delete();
    repeat (n) q.push_back(8'($urandom));
  endfunction

  // testbench-driven frame, 8 data bits, no parity; stop bit value given
  task automatic line_frame(input int p, input logic [7:0] d, input logic stop);
    int bt;
    bt = 16 * divisor;
    @(negedge clk) line[p] = 0;
    repeat (bt) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      line[p] = d[i];
      repeat (bt) @(negedge clk);
    end
    line[p] = stop;
    repeat (bt) @(negedge clk);
    line[p] = 1;
    repeat (2 * bt) @(negedge clk);
  endtask

  // ---------------- the test ----------------
  initial begin
    logic [7:0] a[$], b[$], ra[$], rb[$], lsr, v, iir;
    for (int p = 0; p < 2; p++) begin
      wb_cyc[p] = 0; wb_stb[p] = 0; wb_we[p] = 0; wb_adr[p] = '0; wb_wd[p] = '0;
      line[p] = 1; route[p] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 2; p++) begin
      set_divisor(p, divisor, 8'h03);            // 8N1
      wb_write(p, ADDR_IIR_FCR, 8'h07);          // FIFOs on and cleared, trigger 1
      wb_write(p, ADDR_LCR, 8'h80);
      wb_read(p, ADDR_RBR_THR_DLL, v);
      check(v == 8'(divisor), "DLL reads back through DLAB");
      wb_write(p, ADDR_LCR, 8'h03);
    end

    // test case 1: loopback of each UART
    route[0] = 1; route[1] = 1;
    for (int p = 0; p < 2; p++) begin
      random_chars(10, a);
      send(p, a);
      receive(p, 10, ra, lsr);
      compare(ra, a, $sformatf("loopback UART%0d", p + 1));
      n_loop++;
    end

    // test case 2: half duplex both ways
    route[0] = 0; route[1] = 0;
    for (int p = 0; p < 2; p++) begin
      random_chars(12, a);
      send(p, a);
      receive(1 - p, 12, ra, lsr);
      compare(ra, a, $sformatf("half duplex UART%0d -> UART%0d", p + 1, 2 - p));
      check((lsr & 8'h1E) == 0, "no line errors");
      n_half++;
    end

    // test case 3: full duplex, both sending at once, with frame timing
    begin
      longint unsigned t_start;
      random_chars(14, a);
      random_chars(14, b);
      t_start = cyc;
      fork
        send(0, a);
        send(1, b);
      join
      fork
        receive(1, 14, rb, lsr);
        receive(0, 14, ra, v);
      join
      compare(rb, a, "full duplex UART1 -> UART2");
      compare(ra, b, "full duplex UART2 -> UART1");
      n_full++;
    end

    // test case 4: UART1 to both receivers
    route[0] = 1; route[1] = 3;
    random_chars(9, a);
    send(0, a);
    fork
      receive(0, 9, ra, lsr);
      receive(1, 9, rb, v);
    join
    compare(ra, a, "broadcast, UART1 receiver");
    compare(rb, a, "broadcast, UART2 receiver");
    n_bcast++;
    route[0] = 0; route[1] = 0;

    // frame timing and divisor change: 3 characters at divisor 3
    divisor = 3;
    for (int p = 0; p < 2; p++) set_divisor(p, divisor, 8'h03);
    n_baud++;
    begin
      longint unsigned t0, t1;
      random_chars(3, a);
      fork
        send(0, a);
        begin
          @(negedge txd[0]);
          t0 = cyc;
          // the third start bit follows exactly two frames later; the
          // wait ends inside the stop bit, so the next fall is a start bit
          repeat (2) begin
            repeat (16 * divisor * 10 - 8) @(posedge clk);
            @(negedge txd[0]);
          end
          t1 = cyc;
        end
      join
      check(t1 - t0 == longint'(2 * 10 * 16 * divisor),
            $sformatf("two frames took %0d clocks, expected %0d", t1 - t0, 2 * 10 * 16 * divisor));
      n_timing++;
      receive(1, 3, rb, lsr);
      compare(rb, a, "divisor 3 transfer");
    end
    divisor = 1;
    for (int p = 0; p < 2; p++) set_divisor(p, divisor, 8'h03);

    // THRE interrupt on UART1
    wb_write(0, ADDR_IER_DLH, 8'h02);
    random_chars(3, a);
    send(0, a);
    wb_read(0, ADDR_IIR_FCR, iir);          // clears the pending THRE from enabling
    send(0, a);
    do @(posedge clk); while (!irq[0]);
    wb_read(0, ADDR_IIR_FCR, iir);
    check(iir == 8'hC2, $sformatf("IIR %h, expected THRE", iir));
    if (iir == 8'hC2) n_thre++;
    wb_write(0, ADDR_IER_DLH, 8'h00);
    receive(1, 6, rb, lsr);

    // trigger level 4 on UART2
    wb_write(1, ADDR_IIR_FCR, 8'h41);
    wb_write(1, ADDR_IER_DLH, 8'h01);
    random_chars(3, a);
    send(0, a);
    wait_idle(0);
    repeat (16 * divisor * 2) @(posedge clk);
    check(!irq[1], "3 characters stay below trigger level 4");
    send(0, a[0:0]);
    wait_idle(0);
    repeat (16 * divisor * 2) @(posedge clk);
    check(irq[1], "4th character reaches trigger level 4");
    wb_read(1, ADDR_IIR_FCR, iir);
    check(iir == 8'hC4, $sformatf("IIR %h, expected data available", iir));
    if (irq[1] && iir == 8'hC4) n_trig++;
    // FIFO clear through FCR
    wb_write(1, ADDR_IIR_FCR, 8'h43);
    wb_read(1, ADDR_LSR, lsr);
    check(!lsr[0] && !irq[1], "receiver FIFO cleared by FCR");
    if (!lsr[0]) n_clear++;
    wb_write(1, ADDR_IIR_FCR, 8'h01);

    // line status interrupt + parity error: UART1 sends even parity,
    // UART2 expects odd
    wb_write(1, ADDR_IER_DLH, 8'h04);
    wb_write(0, ADDR_LCR, 8'h1B);
    wb_write(1, ADDR_LCR, 8'h0B);
    a.delete();
    a.push_back(8'h01);                      // one 1: even parity bit 1, odd wants 0
    send(0, a);
    wait_idle(0);
    repeat (16 * divisor * 2) @(posedge clk);
    check(irq[1], "line status interrupt");
    wb_read(1, ADDR_IIR_FCR, iir);
    check(iir == 8'hC6, $sformatf("IIR %h, expected line status", iir));
    if (iir == 8'hC6) n_rls++;
    wb_read(1, ADDR_LSR, lsr);
    check(lsr[2] && lsr[7], $sformatf("parity error in LSR %h", lsr));
    if (lsr[2]) n_pe++;
    wb_read(1, ADDR_RBR_THR_DLL, v);
    check(v == 8'h01, "character with parity error still delivered");
    repeat (2) @(posedge clk);
    check(!irq[1], "LSR read clears line status interrupt");
    wb_write(1, ADDR_IER_DLH, 8'h00);
    wb_write(0, ADDR_LCR, 8'h03);
    wb_write(1, ADDR_LCR, 8'h03);

    // framing error: testbench drives UART2's line with a 0 stop bit
    route[1] = 2;
    line_frame(1, 8'hA7, 1'b0);
    wb_read(1, ADDR_LSR, lsr);
    check(lsr[3] && lsr[0], $sformatf("framing error in LSR %h", lsr));
    if (lsr[3]) n_fe++;
    wb_read(1, ADDR_RBR_THR_DLL, v);
    check(v == 8'hA7, $sformatf("framed data %h", v));
    line_frame(1, 8'h5E, 1'b1);
    wb_read(1, ADDR_LSR, lsr);
    check(lsr == 8'h61, $sformatf("clean frame after the error, LSR %h", lsr));
    wb_read(1, ADDR_RBR_THR_DLL, v);
    check(v == 8'h5E, "receiver resynchronised");
    route[1] = 0;

    // break: UART1 holds its line low for more than a frame
    wb_write(0, ADDR_LCR, 8'h43);
    repeat (16 * divisor * 14) @(posedge clk);
    wb_write(0, ADDR_LCR, 8'h03);
    repeat (16 * divisor * 2) @(posedge clk);
    wb_read(1, ADDR_LSR, lsr);
    check(lsr[4] && lsr[3], $sformatf("break in LSR %h", lsr));
    if (lsr[4]) n_bi++;
    wb_read(1, ADDR_RBR_THR_DLL, v);
    check(v == 8'h00, "break delivers a zero character");
    random_chars(2, a);
    send(0, a);
    receive(1, 2, rb, lsr);
    compare(rb, a, "transfer after break");

    // overrun in FIFO mode: 17 characters into a 16-deep FIFO
    random_chars(17, a);
    send(0, a[0:15]);
    wait_idle(0);
    send(0, a[16:16]);
    wait_idle(0);
    repeat (16 * divisor * 2) @(posedge clk);
    wb_read(1, ADDR_LSR, lsr);
    check(lsr[1], $sformatf("overrun in FIFO mode, LSR %h", lsr));
    if (lsr[1]) n_oe_fifo++;
    receive(1, 16, rb, lsr);
    compare(rb, a[0:15], "FIFO contents kept on overrun");

    // character mode: FIFOs off, second character overruns
    wb_write(1, ADDR_IIR_FCR, 8'h00);
    wb_write(0, ADDR_IIR_FCR, 8'h00);
    wb_read(1, ADDR_IIR_FCR, iir);
    check(iir[7:6] == 2'b00, "IIR shows FIFOs off");
    random_chars(2, a);
    send(0, a[0:0]);
    wait_idle(0);
    send(0, a[1:1]);
    wait_idle(0);
    repeat (16 * divisor * 2) @(posedge clk);
    wb_read(1, ADDR_LSR, lsr);
    check(lsr[1] && lsr[0], $sformatf("overrun in character mode, LSR %h", lsr));
    if (lsr[1]) n_oe_char++;
    wb_read(1, ADDR_RBR_THR_DLL, v);
    check(v == a[0], "first character kept in character mode");
    // character mode transfer, both ways, one character at a time
    for (int i = 0; i < 4; i++) begin
      random_chars(1, a);
      send(i % 2, a);
      receive(1 - i % 2, 1, rb, lsr);
      compare(rb, a, "character mode transfer");
    end

    // every mechanism must have happened
    check(n_loop == 2 && n_half == 2 && n_full == 1 && n_bcast == 1, "all four test cases ran");
    check(n_pe > 0, "parity error seen");
    check(n_fe > 0, "framing error seen");
    check(n_bi > 0, "break seen");
    check(n_oe_fifo > 0 && n_oe_char > 0, "overrun seen in both modes");
    check(n_clear > 0, "FIFO clear seen");
    check(n_trig > 0 && n_thre > 0 && n_rls > 0, "all interrupt kinds seen");
    check(n_baud > 0 && n_timing > 0, "divisor change and frame timing seen");
    $display("mechanisms: loopback %0d half %0d full %0d broadcast %0d pe %0d fe %0d bi %0d oe %0d/%0d clear %0d trig %0d thre %0d rls %0d baud %0d timing %0d",
             n_loop, n_half, n_full, n_bcast, n_pe, n_fe, n_bi, n_oe_fifo, n_oe_char, n_clear, n_trig, n_thre, n_rls, n_baud, n_timing);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
