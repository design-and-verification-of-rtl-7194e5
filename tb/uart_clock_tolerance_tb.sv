// uart_clock_tolerance_tb: two UARTs on clocks of different frequency.
//
// UART A runs from a 100 MHz clock, UART B from a clock 2.5 % slower; both
// use divisor 4 and 8N1, so their bit rates differ by 2.5 %, as between two
// systems with independent oscillators. They exchange 24 random characters
// each way at the same time, frames back to back, and every character must
// arrive intact with no line error: the receiver's mid-bit sampling has
// to absorb the drift over a whole frame. Then UART B's clock is made 12 %
// slower, beyond what a 10-bit frame can absorb (about half a bit over
// 9.5 bits, less the start-detection uncertainty), and the test checks that
// the mismatch is noticed (a wrong character or a framing error) rather
// than passing silently.
module uart_clock_tolerance_tb
  import uart_pkg::*;
;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int DIV = 4;
  logic       clk [2];
  logic       rst_n = 1'b0;
  logic       wb_cyc [2];
  logic       wb_stb [2];
  logic       wb_we  [2];
  logic [2:0] wb_adr [2];
  logic [7:0] wb_wd  [2];
  logic [7:0] wb_rd  [2];
  logic       wb_ack [2];
  logic       irq    [2];
  logic       txd    [2];
  realtime    half_b = 5.125ns;   // UART B half period
  int checks = 0, failures = 0;

  uart_top ua (
    .clk(clk[0]), .rst_n,
    .wb_cyc_i(wb_cyc[0]), .wb_stb_i(wb_stb[0]), .wb_we_i(wb_we[0]), .wb_adr_i(wb_adr[0]),
    .wb_dat_i(wb_wd[0]), .wb_dat_o(wb_rd[0]), .wb_ack_o(wb_ack[0]), .int_o(irq[0]),
    .txd_o(txd[0]), .rxd_i(txd[1])
  );
  uart_top ub (
    .clk(clk[1]), .rst_n,
    .wb_cyc_i(wb_cyc[1]), .wb_stb_i(wb_stb[1]), .wb_we_i(wb_we[1]), .wb_adr_i(wb_adr[1]),
    .wb_dat_i(wb_wd[1]), .wb_dat_o(wb_rd[1]), .wb_ack_o(wb_ack[1]), .int_o(irq[1]),
    .txd_o(txd[1]), .rxd_i(txd[0])
  );

  initial begin
    clk[0] = 1'b0;
    forever #5ns clk[0] = ~clk[0];
  end
  initial begin
    clk[1] = 1'b0;
    forever #(half_b) clk[1] = ~clk[1];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic neg(input int p);
    if (p == 0) @(negedge clk[0]);
    else        @(negedge clk[1]);
  endtask

  task automatic pos(input int p);
    if (p == 0) @(posedge clk[0]);
    else        @(posedge clk[1]);
  endtask

  task automatic wb_write(input int p, input logic [2:0] a, input logic [7:0] d);
    neg(p);
    wb_cyc[p] = 1; wb_stb[p] = 1; wb_we[p] = 1; wb_adr[p] = a; wb_wd[p] = d;
    do pos(p); while (!wb_ack[p]);
    neg(p);
    wb_cyc[p] = 0; wb_stb[p] = 0; wb_we[p] = 0;
  endtask

  task automatic wb_read(input int p, input logic [2:0] a, output logic [7:0] d);
    neg(p);
    wb_cyc[p] = 1; wb_stb[p] = 1; wb_we[p] = 0; wb_adr[p] = a;
    do pos(p); while (!wb_ack[p]);
    #1ps d = wb_rd[p];
    neg(p);
    wb_cyc[p] = 0; wb_stb[p] = 0;
  endtask

  task automatic setup(input int p);
    wb_write(p, ADDR_LCR, 8'h80);
    wb_write(p, ADDR_RBR_THR_DLL, 8'(DIV));
    wb_write(p, ADDR_IER_DLH, 8'h00);
    wb_write(p, ADDR_LCR, 8'h03);
    wb_write(p, ADDR_IIR_FCR, 8'h07);
  endtask

  // one host per UART: keeps its transmitter FIFO topped up from q and
  // reads what arrives, until n characters came or the line stayed quiet
  task automatic host(input int p, input logic [7:0] q[$], input int n,
                      output logic [7:0] got[$], output logic [7:0] lsr_or);
    logic [7:0] lsr, d;
    int i = 0, quiet = 0;
    got.delete();
    lsr_or = '0;
    while ((got.size() < n || i < q.size()) && quiet < 4000) begin
      wb_read(p, ADDR_LSR, lsr);
      lsr_or |= lsr;
      quiet++;
      if (lsr[0]) begin
        wb_read(p, ADDR_RBR_THR_DLL, d);
        got.push_back(d);
        quiet = 0;
      end
      if (lsr[5] && i < q.size()) begin
        for (int k = 0; k < 8 && i < q.size(); k++) begin
          wb_write(p, ADDR_RBR_THR_DLL, q[i]);
          i++;
        end
        quiet = 0;
      end
    end
  endtask

  task automatic exchange(input int n, output int bad, output logic [7:0] err);
    logic [7:0] a[$], b[$], ra[$], rb[$], ea, eb;
    repeat (n) a.push_back(8'($urandom));
    repeat (n) b.push_back(8'($urandom));
    fork
      host(0, a, n, ra, ea);
      host(1, b, n, rb, eb);
    join
    bad = 0;
    if (rb.size() != n || ra.size() != n) bad++;
    foreach (a[i]) if (i < rb.size() && rb[i] != a[i]) bad++;
    foreach (b[i]) if (i < ra.size() && ra[i] != b[i]) bad++;
    err = (ea | eb) & 8'h1E;
  endtask

  initial begin
    int bad;
    logic [7:0] err;
    for (int p = 0; p < 2; p++) begin
      wb_cyc[p] = 0; wb_stb[p] = 0; wb_we[p] = 0; wb_adr[p] = '0; wb_wd[p] = '0;
    end
    #40ns rst_n = 1'b1;
    fork
      setup(0);
      setup(1);
    join
    // 2.5 % mismatch: must work
    exchange(24, bad, err);
    check(bad == 0, $sformatf("2.5%% clock mismatch: %0d wrong or missing characters", bad));
    check(err == 0, $sformatf("2.5%% clock mismatch: line errors %h", err));
    // 12 % mismatch: must be detected
    half_b = 5.68ns;
    #1us;
    exchange(24, bad, err);
    check(bad > 0 || err != 0, "12% clock mismatch went unnoticed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
