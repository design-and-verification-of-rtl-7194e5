// uart_pkg: types and constants shared by the 16550-style UART.
//
// Holds the register address map (three address bits, 8-bit registers as
// in the article's register list: RBR/THR/DLL share address 0, IER/DLH share
// address 1, IIR/FCR share address 2), the packed layouts of LCR and FCR,
// the IIR identification codes and the parity helper used by both the
// transmitter and the receiver. The register names follow the article;
// the bit positions inside LCR, FCR, LSR and IIR are the classic 16550
// positions, which the article does not spell out.
package uart_pkg;

  // Register addresses (wb_adr_i[2:0]).
  typedef enum logic [2:0] {
    ADDR_RBR_THR_DLL = 3'd0,
    ADDR_IER_DLH     = 3'd1,
    ADDR_IIR_FCR     = 3'd2,
    ADDR_LCR         = 3'd3,
    ADDR_MCR         = 3'd4,
    ADDR_LSR         = 3'd5,
    ADDR_MSR         = 3'd6,
    ADDR_SCR         = 3'd7
  } uart_addr_e;

  // Line Control Register.
  typedef struct packed {
    logic       dlab;   // [7] divisor latch access
    logic       brk;    // [6] break control: hold TXD low
    logic       sp;     // [5] stick parity
    logic       eps;    // [4] even parity select
    logic       pen;    // [3] parity enable
    logic       stb;    // [2] 2 stop bits (1.5 for 5-bit words)
    logic [1:0] wls;    // [1:0] word length = 5 + wls
  } lcr_t;

  // FIFO Control Register (write only).
  typedef struct packed {
    logic [1:0] rx_trig;  // [7:6] RX trigger level: 1, 4, 8, 14
    logic [1:0] rsvd;     // [5:4]
    logic       dma;      // [3] DMA mode select, stored but unused
    logic       tx_clr;   // [2] clear TX FIFO (self-clearing)
    logic       rx_clr;   // [1] clear RX FIFO (self-clearing)
    logic       fifo_en;  // [0] enable FIFOs
  } fcr_t;

  // Interrupt Enable Register, low nibble.
  typedef struct packed {
    logic erls;   // [2] receiver line status
    logic ethre;  // [1] transmitter holding register empty
    logic erbi;   // [0] received data available
  } ier_t;

  // IIR[3:0] identification codes, highest priority first.
  typedef enum logic [3:0] {
    IIR_RLS  = 4'b0110,  // receiver line status (overrun, parity, framing, break)
    IIR_RDA  = 4'b0100,  // received data available / trigger level reached
    IIR_THRE = 4'b0010,  // transmitter holding register empty
    IIR_NONE = 4'b0001   // no interrupt pending
  } iir_id_e;

  // Parity bit for the low (5 + wls) bits of data.
  //   pen = 0 : no parity bit (value unused)
  //   sp  = 1 : stick parity, bit is the inverse of eps
  //   eps = 1 : even parity, eps = 0 : odd parity
  function automatic logic parity_bit(input logic [7:0] data, input lcr_t lcr);
    logic [7:0] mask;
    logic       x;
    mask = 8'hFF >> (3 - lcr.wls);
    x    = ^(data & mask);
    if (lcr.sp) return ~lcr.eps;
    return lcr.eps ? x : ~x;
  endfunction

endpackage
