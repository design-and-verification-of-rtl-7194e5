// uart_top: one complete UART with a Wishbone host interface.
//
// Data path: the host writes characters to THR, they queue in the
// transmitter FIFO, the transmitter shift register frames each one
// (start, data, parity, stop) and sends it on txd_o. On the other side
// the receiver shift register de-frames what arrives on rxd_i, checks
// parity and stop bit, and queues the character in the receiver FIFO,
// from where the host reads it through RBR. The baud rate generator
// divides clk by the divisor latch (DLH:DLL) into the 16x baud clock that
// paces both directions, so baud = f_clk / (16 * divisor). A THR write to
// a full transmitter FIFO is dropped without a flag (the host is expected
// to check LSR.THRE first). The interrupt
// block raises int_o for line errors, received data and an empty
// transmitter FIFO, as enabled in IER and identified in IIR.
// Host side: classic Wishbone slave, 8-bit data, 3-bit address, two clocks
// per access (see uart_wb). Serial side: txd_o idles high; rxd_i may be
// asynchronous to clk.
// The split into baud rate generator, transmitter, receiver, FIFOs,
// registers and interrupt logic, and the Wishbone bus, follow the
// article; FIFO_DEPTH = 16 is this design's choice (the article gives
// no depth).
module uart_top
  import uart_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  // Wishbone slave
  input  logic       wb_cyc_i,
  input  logic       wb_stb_i,
  input  logic       wb_we_i,
  input  logic [2:0] wb_adr_i,
  input  logic [7:0] wb_dat_i,
  output logic [7:0] wb_dat_o,
  output logic       wb_ack_o,
  // interrupt to the CPU
  output logic       int_o,
  // serial line
  output logic       txd_o,      // UARTn_TXD
  input  logic       rxd_i       // UARTn_RXD
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic          reg_we, reg_re;
  logic [2:0]    reg_addr;
  logic [7:0]    reg_wdata, reg_rdata;
  lcr_t          lcr;
  logic [15:0]   divisor;
  ier_t          ier;
  logic          fifo_en;
  logic          bclk;
  // transmitter FIFO
  logic          tx_push, tx_clear, tx_pop, tx_empty, tx_busy;
  logic [7:0]    tx_wdata, tx_rdata;
  // receiver FIFO
  logic          rx_push, rx_pop, rx_clear, rx_empty, rx_ovf;
  logic [7:0]    rx_data, rx_rdata;
  logic [CW-1:0] rx_count;
  logic          rx_pe, rx_fe, rx_bi;
  // interrupts
  iir_id_e       iir_id;
  logic          rls_cond, rda_cond, thr_write, iir_read;

  uart_wb u_wb (
    .clk, .rst_n,
    .wb_cyc_i, .wb_stb_i, .wb_we_i, .wb_adr_i, .wb_dat_i, .wb_dat_o, .wb_ack_o,
    .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata
  );

  uart_regs #(.FIFO_DEPTH(FIFO_DEPTH)) u_regs (
    .clk, .rst_n,
    .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata,
    .lcr, .divisor, .ier, .fifo_en,
    .tx_push, .tx_wdata, .tx_clear, .tx_empty, .tx_busy,
    .rx_pop, .rx_clear, .rx_rdata, .rx_empty, .rx_count, .rx_overflow(rx_ovf),
    .rx_push, .rx_pe, .rx_fe, .rx_bi,
    .iir_id, .rls_cond, .rda_cond, .thr_write, .iir_read
  );

  uart_intr u_intr (
    .clk, .rst_n, .ier, .rls_cond, .rda_cond,
    .thr_empty(tx_empty), .thr_write, .iir_read, .iir_id, .irq(int_o)
  );

  uart_brg u_brg (
    .clk, .rst_n, .divisor, .bclk
  );

  uart_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst_n, .fifo_en, .clear(tx_clear),
    .push(tx_push), .wdata(tx_wdata), .pop(tx_pop), .rdata(tx_rdata),
    .empty(tx_empty), .full(), .overflow(), .count()
  );

  uart_tx u_tx (
    .clk, .rst_n, .bclk, .lcr,
    .tx_empty, .tx_data(tx_rdata), .tx_pop, .txd(txd_o), .busy(tx_busy)
  );

  uart_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst_n, .fifo_en, .clear(rx_clear),
    .push(rx_push), .wdata(rx_data), .pop(rx_pop), .rdata(rx_rdata),
    .empty(rx_empty), .full(), .overflow(rx_ovf), .count(rx_count)
  );

  uart_rx u_rx (
    .clk, .rst_n, .bclk, .lcr, .rxd(rxd_i),
    .rx_push, .rx_data, .rx_pe, .rx_fe, .rx_bi, .busy()
  );

endmodule
