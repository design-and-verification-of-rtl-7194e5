// uart_regs_tb: self-checking test of the register file.
//
// Drives the one-clock register strobes directly and plays the FIFOs,
// receiver and interrupt block with plain signals. Directed checks cover
// the reset values; the DLAB rule (address 0 and 1 reach DLL / DLH when
// LCR.DLAB = 1, RBR / THR and IER when it is 0) and the divisor output;
// THR writes pushing the transmitter FIFO and RBR reads popping the
// receiver FIFO; FCR (FIFO enable, the clear bits, clearing on a mode
// change, trigger levels) and its effect on the data-available condition;
// IIR contents and the IIR read strobe; LSR status bits, the sticky error
// bits, their clearing by an LSR read and the line-status condition; and
// the unimplemented addresses reading 0.
module uart_regs_tb
  import uart_pkg::*;
;
  localparam int D = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic reg_we = 0, reg_re = 0;
  logic [2:0] reg_addr = '0;
  logic [7:0] reg_wdata = '0, reg_rdata;
  lcr_t lcr;
  logic [15:0] divisor;
  ier_t ier;
  logic fifo_en;
  logic tx_push, tx_clear, rx_pop, rx_clear;
  logic [7:0] tx_wdata;
  logic tx_empty = 1, tx_busy = 0;
  logic [7:0] rx_rdata = 8'hA5;
  logic rx_empty = 1;
  logic [$clog2(D+1)-1:0] rx_count = '0;
  logic rx_overflow = 0, rx_push = 0, rx_pe = 0, rx_fe = 0, rx_bi = 0;
  iir_id_e iir_id = IIR_NONE;
  logic rls_cond, rda_cond, thr_write, iir_read;
  int checks = 0, failures = 0;

  uart_regs #(.FIFO_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // write strobe; returns the side outputs seen during the strobe
  task automatic wr(input logic [2:0] a, input logic [7:0] d,
                    output bit push, output bit txc, output bit rxc);
    @(negedge clk);
    reg_we = 1; reg_addr = a; reg_wdata = d;
    #1;
    push = tx_push; txc = tx_clear; rxc = rx_clear;
    if (push) check(tx_wdata == d, "THR data to FIFO");
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic w(input logic [2:0] a, input logic [7:0] d);
    bit p, t, r;
    wr(a, d, p, t, r);
  endtask

  task automatic rd(input logic [2:0] a, output logic [7:0] q, output bit pop, output bit iirr);
    @(negedge clk);
    reg_re = 1; reg_addr = a;
    #1;
    q = reg_rdata; pop = rx_pop; iirr = iir_read;
    @(negedge clk);
    reg_re = 0;
  endtask

  task automatic expect_rd(input logic [2:0] a, input logic [7:0] e, input string what);
    logic [7:0] q;
    bit p, i;
    rd(a, q, p, i);
    check(q == e, $sformatf("%s: read %h expected %h", what, q, e));
  endtask

  // one clock of a receiver event
  task automatic rx_event(input bit pe, input bit fe, input bit bi, input bit ovf);
    @(negedge clk);
    rx_push = !ovf; rx_pe = pe; rx_fe = fe; rx_bi = bi; rx_overflow = ovf;
    @(negedge clk);
    rx_push = 0; rx_pe = 0; rx_fe = 0; rx_bi = 0; rx_overflow = 0;
  endtask

  initial begin
    bit p, t, r, ir;
    logic [7:0] q;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // reset values
    expect_rd(ADDR_LCR, 8'h00, "LCR reset");
    expect_rd(ADDR_IER_DLH, 8'h00, "IER reset");
    expect_rd(ADDR_IIR_FCR, 8'h01, "IIR reset");
    expect_rd(ADDR_LSR, 8'h60, "LSR reset (THRE, TEMT)");
    check(divisor == 16'h0000 && !fifo_en, "divisor and FIFO mode reset");
    // divisor latch through DLAB
    w(ADDR_LCR, 8'h83);
    check(lcr.dlab && lcr.wls == 2'd3, "LCR fields");
    wr(ADDR_RBR_THR_DLL, 8'h34, p, t, r);
    check(!p, "DLL write does not push THR");
    w(ADDR_IER_DLH, 8'h12);
    check(divisor == 16'h1234, $sformatf("divisor %h", divisor));
    check(ier == '0, "DLH write leaves IER");
    rd(ADDR_RBR_THR_DLL, q, p, ir);
    check(q == 8'h34 && !p, "DLL read back, no RBR pop");
    expect_rd(ADDR_IER_DLH, 8'h12, "DLH read back");
    // DLAB = 0: THR, RBR, IER
    w(ADDR_LCR, 8'h1B);
    check(!lcr.dlab && lcr.pen && lcr.eps && lcr.wls == 2'd3, "LCR 8E1");
    wr(ADDR_RBR_THR_DLL, 8'h5A, p, t, r);
    check(p, "THR write pushes the transmitter FIFO");
    check(divisor == 16'h1234, "THR write leaves DLL");
    rx_empty = 0;
    rd(ADDR_RBR_THR_DLL, q, p, ir);
    check(q == 8'hA5 && p, "RBR read returns the FIFO head and pops");
    w(ADDR_IER_DLH, 8'hFF);
    check(ier == 3'b111, "IER written");
    expect_rd(ADDR_IER_DLH, 8'h07, "IER read back (3 bits)");
    // FCR / IIR
    wr(ADDR_IIR_FCR, 8'hC1, p, t, r);
    check(t && r, "enabling the FIFOs clears both");
    check(fifo_en, "FIFO enabled");
    iir_id = IIR_RDA;
    rd(ADDR_IIR_FCR, q, p, ir);
    check(q == 8'hC4 && ir, $sformatf("IIR %h with FIFOs on, read strobe", q));
    wr(ADDR_IIR_FCR, 8'h43, p, t, r);
    check(r && !t, "FCR bit 1 clears only the receiver FIFO");
    wr(ADDR_IIR_FCR, 8'h45, p, t, r);
    check(t && !r, "FCR bit 2 clears only the transmitter FIFO");
    // trigger level 4
    rx_count = 3; #1 check(!rda_cond, "3 < trigger 4");
    rx_count = 4; #1 check(rda_cond, "4 reaches trigger 4");
    w(ADDR_IIR_FCR, 8'h81);
    rx_count = 7; #1 check(!rda_cond, "7 < trigger 8");
    rx_count = 8; #1 check(rda_cond, "8 reaches trigger 8");
    w(ADDR_IIR_FCR, 8'hC1);
    rx_count = 13; #1 check(!rda_cond, "13 < trigger 14");
    rx_count = 14; #1 check(rda_cond, "14 reaches trigger 14");
    w(ADDR_IIR_FCR, 8'h01);
    rx_count = 1; #1 check(rda_cond, "1 reaches trigger 1");
    wr(ADDR_IIR_FCR, 8'h00, p, t, r);
    check(t && r && !fifo_en, "disabling the FIFOs clears both");
    rx_count = 1; rx_empty = 0; #1 check(rda_cond, "character mode: data ready");
    rx_empty = 1; rx_count = 0; #1 check(!rda_cond, "character mode: empty");
    iir_id = IIR_NONE;
    expect_rd(ADDR_IIR_FCR, 8'h01, "IIR with FIFOs off");
    // LSR
    tx_empty = 0;
    expect_rd(ADDR_LSR, 8'h00, "LSR transmitter busy");
    tx_empty = 1; tx_busy = 1;
    expect_rd(ADDR_LSR, 8'h20, "LSR THRE without TEMT");
    tx_busy = 0; rx_empty = 0;
    expect_rd(ADDR_LSR, 8'h61, "LSR data ready");
    rx_event(1, 0, 0, 0);
    check(rls_cond, "parity error raises line status");
    expect_rd(ADDR_LSR, 8'h65, "LSR parity error (FIFOs off: no bit 7)");
    check(!rls_cond, "LSR read clears line status");
    expect_rd(ADDR_LSR, 8'h61, "LSR error cleared");
    w(ADDR_IIR_FCR, 8'h01);
    rx_event(0, 1, 1, 0);
    expect_rd(ADDR_LSR, 8'hF9, "LSR framing + break, FIFO error bit");
    rx_event(0, 0, 0, 1);
    expect_rd(ADDR_LSR, 8'h63, "LSR overrun");
    expect_rd(ADDR_LSR, 8'h61, "LSR overrun cleared");
    // error arriving in the same clock as the LSR read is kept
    @(negedge clk);
    reg_re = 1; reg_addr = ADDR_LSR; rx_push = 1; rx_fe = 1;
    @(negedge clk);
    reg_re = 0; rx_push = 0; rx_fe = 0;
    expect_rd(ADDR_LSR, 8'hE9, "new error wins over the clearing read");
    // unimplemented addresses
    expect_rd(ADDR_MCR, 8'h00, "MCR not implemented");
    expect_rd(ADDR_MSR, 8'h00, "MSR not implemented");
    expect_rd(ADDR_SCR, 8'h00, "SCR not implemented");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
