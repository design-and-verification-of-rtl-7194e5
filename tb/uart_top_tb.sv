// uart_top_tb: self-checking test of one complete UART, looped back.
//
// TXD is wired to RXD, so everything the UART sends comes back to its own
// receiver (the single-module test case). All access goes through the
// Wishbone port with a master in the testbench. The test programs the
// divisor through DLAB, enables the FIFOs and interrupts, and then for
// several line formats writes a burst of random characters to THR and
// reads them back from RBR, comparing each with what was written. It
// checks: the bit time on TXD (16 * divisor clocks per bit, measured from
// start-bit edge to start-bit edge of back-to-back frames); the THRE
// interrupt (on enabling it and when the FIFO drains) and its clearing by
// an IIR read; the received-data interrupt
// and IIR code; LSR.DR, THRE and TEMT; and that no error bit is set.
module uart_top_tb
  import uart_pkg::*;
;
  localparam int DIVISOR = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wb_cyc_i = 0, wb_stb_i = 0, wb_we_i = 0;
  logic [2:0] wb_adr_i = '0;
  logic [7:0] wb_dat_i = '0, wb_dat_o;
  logic wb_ack_o, int_o, txd_o, rxd_i;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  longint unsigned fall_t[$];
  logic txd_q = 1'b1;

  uart_top dut (.*);

  assign rxd_i = txd_o;

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    cyc   <= cyc + 1;
    txd_q <= txd_o;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic wb_write(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk);
    wb_cyc_i = 1; wb_stb_i = 1; wb_we_i = 1; wb_adr_i = a; wb_dat_i = d;
    do @(posedge clk); while (!wb_ack_o);
    @(negedge clk);
    wb_cyc_i = 0; wb_stb_i = 0; wb_we_i = 0;
  endtask

  task automatic wb_read(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk);
    wb_cyc_i = 1; wb_stb_i = 1; wb_we_i = 0; wb_adr_i = a;
    do @(posedge clk); while (!wb_ack_o);
    #1 d = wb_dat_o;
    @(negedge clk);
    wb_cyc_i = 0; wb_stb_i = 0;
  endtask

  task automatic burst(input logic [7:0] lcr_v, input int n);
    logic [7:0] sent[$], q, lsr, mask;
    int bits;
    lcr_t f;
    f = lcr_t'(lcr_v);
    mask = 8'hFF >> (3 - f.wls);
    bits = 1 + 5 + int'(f.wls) + (f.pen ? 1 : 0) + (f.stb ? (f.wls == 0 ? 1 : 2) : 1);
    wb_write(ADDR_LCR, lcr_v);
    frame_len = (f.stb && f.wls == 0) ? longint'(16 * DIVISOR * (1 + 5 + (f.pen ? 1 : 0)) + 24 * DIVISOR)
                                      : longint'(16 * DIVISOR * bits);
    fall_t.delete();
    for (int i = 0; i < n; i++) begin
      q = 8'($urandom);
      sent.push_back(q & mask);
      wb_write(ADDR_RBR_THR_DLL, q);
    end
    // wait until everything is sent
    do wb_read(ADDR_LSR, lsr); while (!lsr[6]);
    // frame spacing on the line: frames follow back to back
    check(fall_t.size() >= n, $sformatf("%0d start edges for %0d characters", fall_t.size(), n));
    for (int i = 1; i < n && i < fall_t.size(); i++) begin
      longint unsigned gap, want;
      gap = fall_t[i] - fall_t[i-1];
      want = frame_len;
      check(gap == want, $sformatf("LCR %h: frame period %0d clocks, expected %0d", lcr_v, gap, want));
    end
    // the last character needs half a bit more to be received
    repeat (16 * DIVISOR) @(posedge clk);
    wb_read(ADDR_LSR, lsr);
    check(lsr == 8'hE1 || lsr == 8'h61, $sformatf("LSR %h: data ready, empty, no errors", lsr));
    for (int i = 0; i < n; i++) begin
      wb_read(ADDR_LSR, lsr);
      check(lsr[0], "DR before each read");
      wb_read(ADDR_RBR_THR_DLL, q);
      check(q == sent[i], $sformatf("LCR %h char %0d: got %h sent %h", lcr_v, i, q, sent[i]));
    end
    wb_read(ADDR_LSR, lsr);
    check(!lsr[0], "no data left");
  endtask

  // start-bit edges: a falling edge after the previous frame has ended
  longint unsigned frame_len = 16 * DIVISOR * 10, busy_until = 0;
  always @(posedge clk)
    if (txd_q && !txd_o && cyc >= busy_until) begin
      fall_t.push_back(cyc);
      busy_until = cyc + frame_len - 8 * DIVISOR;
    end

  initial begin
    logic [7:0] q;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wb_read(ADDR_LSR, q);
    check(q == 8'h60, $sformatf("LSR after reset %h", q));
    wb_read(ADDR_IIR_FCR, q);
    check(q == 8'h01 && !int_o, "no interrupt after reset");
    // divisor through DLAB
    wb_write(ADDR_LCR, 8'h80);
    wb_write(ADDR_RBR_THR_DLL, 8'(DIVISOR));
    wb_write(ADDR_IER_DLH, 8'h00);
    wb_write(ADDR_LCR, 8'h03);
    wb_write(ADDR_IIR_FCR, 8'h07);   // FIFOs on, cleared, trigger 1
    // THRE interrupt on enabling it while empty
    wb_write(ADDR_IER_DLH, 8'h02);
    repeat (2) @(posedge clk);
    check(int_o, "THRE interrupt");
    wb_read(ADDR_IIR_FCR, q);
    check(q == 8'hC2, $sformatf("IIR %h, expected THRE", q));
    repeat (2) @(posedge clk);
    check(!int_o, "IIR read clears THRE");
    // received data interrupt
    wb_write(ADDR_IER_DLH, 8'h01);
    wb_write(ADDR_RBR_THR_DLL, 8'h3C);
    do @(posedge clk); while (!int_o);
    wb_read(ADDR_IIR_FCR, q);
    check(q == 8'hC4, $sformatf("IIR %h, expected data available", q));
    wb_read(ADDR_RBR_THR_DLL, q);
    check(q == 8'h3C, "first loopback character");
    repeat (2) @(posedge clk);
    check(!int_o, "reading RBR clears the data interrupt");
    // THRE interrupt when the transmitter FIFO drains (the looped-back
    // characters are still unread at that time)
    wb_write(ADDR_IER_DLH, 8'h02);
    wb_read(ADDR_IIR_FCR, q);
    wb_write(ADDR_RBR_THR_DLL, 8'h11);
    wb_write(ADDR_RBR_THR_DLL, 8'h22);
    repeat (2) @(posedge clk);
    check(!int_o, "no THRE interrupt while characters wait");
    begin
      int guard = 0;
      while (!int_o && guard < 16 * DIVISOR * 40) begin
        @(posedge clk);
        guard++;
      end
    end
    wb_read(ADDR_IIR_FCR, q);
    check(q == 8'hC2, $sformatf("IIR %h, expected THRE after draining", q));
    wb_read(ADDR_LSR, q);
    check(q[5], "THRE set with the interrupt");
    do wb_read(ADDR_LSR, q); while (!q[6]);
    repeat (16 * DIVISOR) @(posedge clk);
    wb_read(ADDR_RBR_THR_DLL, q);
    check(q == 8'h11, "THRE test character 1");
    wb_read(ADDR_RBR_THR_DLL, q);
    check(q == 8'h22, "THRE test character 2");
    wb_write(ADDR_IER_DLH, 8'h00);
    // formats: 8N1, 7E1, 6O2, 5 bits 1.5 stop + stick parity, 8 odd 2 stop
    burst(8'h03, 12);
    burst(8'h1A, 8);
    burst(8'h0D, 8);
    burst(8'h2C, 6);
    burst(8'h0F, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
