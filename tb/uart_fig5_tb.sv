// uart_fig5_tb: full duplex run with the published example data.
//
// UART1 and UART2 are joined crosswise (TXD1 -> RXD2, TXD2 -> RXD1) and
// send at the same time: UART1 the eight values 12 11 13 12 11 11 11 14,
// UART2 the eight values 33 88 22 77 44 66 66 55 (decimal), 8N1 at a
// divisor of 4. Each receiver must deliver exactly the other side's
// sequence. The run also checks the transfer time: the last character
// must be in the receiver FIFO within 8 frames of 10 bits x 16 x divisor
// clocks from the first start bit (plus the host writes and half a stop
// bit), since both transmitters send back to back from their FIFOs.
// The two sequences are the article's full duplex example; the line
// format, divisor and timing bound are this testbench's choices.
module uart_fig5_tb
  import uart_pkg::*;
;
  localparam int DIV = 4;
  localparam int FRAME = 10 * 16 * DIV;
  logic clk = 1'b0, rst_n = 1'b0;
  logic       wb_cyc [2];
  logic       wb_stb [2];
  logic       wb_we  [2];
  logic [2:0] wb_adr [2];
  logic [7:0] wb_wd  [2];
  logic [7:0] wb_rd  [2];
  logic       wb_ack [2];
  logic       irq    [2];
  logic       txd1, txd2;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  logic [7:0] seq1[8] = '{8'd12, 8'd11, 8'd13, 8'd12, 8'd11, 8'd11, 8'd11, 8'd14};
  logic [7:0] seq2[8] = '{8'd33, 8'd88, 8'd22, 8'd77, 8'd44, 8'd66, 8'd66, 8'd55};

  uart_duplex dut (
    .clk, .rst_n,
    .wb1_cyc_i(wb_cyc[0]), .wb1_stb_i(wb_stb[0]), .wb1_we_i(wb_we[0]),
    .wb1_adr_i(wb_adr[0]), .wb1_dat_i(wb_wd[0]), .wb1_dat_o(wb_rd[0]),
    .wb1_ack_o(wb_ack[0]), .int1_o(irq[0]), .txd1_o(txd1), .rxd1_i(txd2),
    .wb2_cyc_i(wb_cyc[1]), .wb2_stb_i(wb_stb[1]), .wb2_we_i(wb_we[1]),
    .wb2_adr_i(wb_adr[1]), .wb2_dat_i(wb_wd[1]), .wb2_dat_o(wb_rd[1]),
    .wb2_ack_o(wb_ack[1]), .int2_o(irq[1]), .txd2_o(txd2), .rxd2_i(txd1)
  );

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

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

  task automatic setup(input int p);
    wb_write(p, ADDR_LCR, 8'h80);
    wb_write(p, ADDR_RBR_THR_DLL, 8'(DIV));
    wb_write(p, ADDR_IER_DLH, 8'h00);
    wb_write(p, ADDR_LCR, 8'h03);
    wb_write(p, ADDR_IIR_FCR, 8'h07);
  endtask

  task automatic send(input int p, input logic [7:0] s[8]);
    foreach (s[i]) wb_write(p, ADDR_RBR_THR_DLL, s[i]);
  endtask

  task automatic drain(input int p, input logic [7:0] exp[8], input string who);
    logic [7:0] lsr, d;
    for (int i = 0; i < 8; i++) begin
      wb_read(p, ADDR_LSR, lsr);
      check(lsr[0], $sformatf("%s: character %0d ready", who, i));
      wb_read(p, ADDR_RBR_THR_DLL, d);
      check(d == exp[i], $sformatf("%s: got %0d expected %0d", who, d, exp[i]));
    end
    wb_read(p, ADDR_LSR, lsr);
    check(lsr == 8'h60, $sformatf("%s: LSR %h, nothing left and no errors", who, lsr));
  endtask

  initial begin
    longint unsigned t0, t_done;
    logic [7:0] lsr1, lsr2;
    for (int p = 0; p < 2; p++) begin
      wb_cyc[p] = 0; wb_stb[p] = 0; wb_we[p] = 0; wb_adr[p] = '0; wb_wd[p] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      setup(0);
      setup(1);
    join
    t0 = cyc;
    fork
      send(0, seq1);
      send(1, seq2);
    join
    // both transmitters empty
    do begin
      wb_read(0, ADDR_LSR, lsr1);
      wb_read(1, ADDR_LSR, lsr2);
    end while (!(lsr1[6] && lsr2[6]) && cyc - t0 < 20 * FRAME);
    repeat (16 * DIV) @(posedge clk);
    t_done = cyc;
    check(t_done - t0 <= longint'(8 * FRAME + 40 + 16 * DIV + 40),
          $sformatf("transfer took %0d clocks, 8 frames are %0d", t_done - t0, 8 * FRAME));
    drain(1, seq1, "UART2 receiving from UART1");
    drain(0, seq2, "UART1 receiving from UART2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
