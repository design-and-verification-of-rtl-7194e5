// uart_duplex: two UARTs for full duplex serial communication.
//
// Two identical UARTs (uart_top), UART1 and UART2, share the system clock
// and reset; each has its own Wishbone host port and interrupt line and
// its own serial pins. Joined crosswise outside this module (txd1 to rxd2
// and txd2 to rxd1) they form a full duplex link on which both sides send
// at once; other joins give the remaining arrangements the design is used
// in: one UART looped back to itself, one direction only (half duplex), or
// one transmitter driving both receivers.
// The pair of UARTs as the unit of the design follows the article; that
// the serial pins are brought out rather than joined inside is this
// design's choice, so that the same pair serves every arrangement.
// Each port group behaves exactly as in uart_top.
module uart_duplex #(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  // UART1 host port
  input  logic       wb1_cyc_i,
  input  logic       wb1_stb_i,
  input  logic       wb1_we_i,
  input  logic [2:0] wb1_adr_i,
  input  logic [7:0] wb1_dat_i,
  output logic [7:0] wb1_dat_o,
  output logic       wb1_ack_o,
  output logic       int1_o,
  output logic       txd1_o,
  input  logic       rxd1_i,
  // UART2 host port
  input  logic       wb2_cyc_i,
  input  logic       wb2_stb_i,
  input  logic       wb2_we_i,
  input  logic [2:0] wb2_adr_i,
  input  logic [7:0] wb2_dat_i,
  output logic [7:0] wb2_dat_o,
  output logic       wb2_ack_o,
  output logic       int2_o,
  output logic       txd2_o,
  input  logic       rxd2_i
);

  uart_top #(.FIFO_DEPTH(FIFO_DEPTH)) u_uart1 (
    .clk, .rst_n,
    .wb_cyc_i(wb1_cyc_i), .wb_stb_i(wb1_stb_i), .wb_we_i(wb1_we_i),
    .wb_adr_i(wb1_adr_i), .wb_dat_i(wb1_dat_i), .wb_dat_o(wb1_dat_o),
    .wb_ack_o(wb1_ack_o), .int_o(int1_o), .txd_o(txd1_o), .rxd_i(rxd1_i)
  );

  uart_top #(.FIFO_DEPTH(FIFO_DEPTH)) u_uart2 (
    .clk, .rst_n,
    .wb_cyc_i(wb2_cyc_i), .wb_stb_i(wb2_stb_i), .wb_we_i(wb2_we_i),
    .wb_adr_i(wb2_adr_i), .wb_dat_i(wb2_dat_i), .wb_dat_o(wb2_dat_o),
    .wb_ack_o(wb2_ack_o), .int_o(int2_o), .txd_o(txd2_o), .rxd_i(rxd2_i)
  );

endmodule
