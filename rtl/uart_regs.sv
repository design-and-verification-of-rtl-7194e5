// uart_regs: the UART register file and its address decoding.
//
// Registers (3-bit address, 8-bit data):
//   0  read RBR (receiver buffer, pops the receiver FIFO) / write THR
//      (transmitter holding register, pushes the transmitter FIFO);
//      with LCR.DLAB = 1, read and write DLL (divisor LSB latch)
//   1  IER (interrupt enables, bits 2:0); with DLAB = 1, DLH (divisor MSB)
//   2  read IIR (interrupt identification) / write FCR (FIFO control)
//   3  LCR (line control)
//   5  LSR (line status, read only)
//   4, 6, 7 are not implemented: writes are ignored, reads return 0.
// LSR bits: 0 DR data ready, 1 OE overrun, 2 PE parity error, 3 FE framing
// error, 4 BI break, 5 THRE transmitter FIFO empty, 6 TEMT transmitter FIFO
// and shift register empty, 7 error in receiver FIFO (FIFO mode only).
// OE, PE, FE, BI and bit 7 are sticky: set by the receiver, cleared by an
// LSR read (a new error in the same clock wins).
// FCR: bit 0 enables the FIFOs (changing it also empties both), bits 1
// and 2 empty the receiver / transmitter FIFO, bits 7:6 pick the receiver
// trigger level 1, 4, 8 or 14 characters for the data-available interrupt.
// IIR reads as {FIFOs enabled x2, 2'b00, identification code}.
// Interface: one-clock reg_we / reg_re strobes from the bus interface;
// reg_rdata is combinational from reg_addr and is captured by the bus
// interface at the strobe edge. All registers reset to 0 (FIFOs off,
// divisor 0 = baud generator stopped).
// The register set, the shared addresses and the DLAB rule follow the
// article; bit layouts, reset values and the per-bit behaviour are the
// 16550's and this design's choices (the error bits are kept per line,
// not per character in the FIFO).
module uart_regs
  import uart_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // from the bus interface
  input  logic                            reg_we,
  input  logic                            reg_re,
  input  logic [2:0]                      reg_addr,
  input  logic [7:0]                      reg_wdata,
  output logic [7:0]                      reg_rdata,
  // configuration
  output lcr_t                            lcr,
  output logic [15:0]                     divisor,
  output ier_t                            ier,
  output logic                            fifo_en,
  // transmitter FIFO
  output logic                            tx_push,
  output logic [7:0]                      tx_wdata,
  output logic                            tx_clear,
  input  logic                            tx_empty,
  input  logic                            tx_busy,
  // receiver FIFO
  output logic                            rx_pop,
  output logic                            rx_clear,
  input  logic [7:0]                      rx_rdata,
  input  logic                            rx_empty,
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] rx_count,
  input  logic                            rx_overflow,
  // receiver events
  input  logic                            rx_push,
  input  logic                            rx_pe,
  input  logic                            rx_fe,
  input  logic                            rx_bi,
  // interrupt block
  input  iir_id_e                         iir_id,
  output logic                            rls_cond,
  output logic                            rda_cond,
  output logic                            thr_write,
  output logic                            iir_read
);

  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic [7:0]  dll, dlh;
  logic [1:0]  rx_trig;
  logic        oe, pe, fe, bi, fifo_err;
  logic [7:0]  lsr;
  logic        lsr_read;
  logic        rbr_read;
  logic        fcr_write;
  fcr_t        fcr_w;
  logic [CW-1:0] trig_level;

  assign divisor   = {dlh, dll};
  assign fcr_w     = fcr_t'(reg_wdata);

  // decoded accesses
  assign thr_write = reg_we && reg_addr == ADDR_RBR_THR_DLL && !lcr.dlab;
  assign rbr_read  = reg_re && reg_addr == ADDR_RBR_THR_DLL && !lcr.dlab;
  assign fcr_write = reg_we && reg_addr == ADDR_IIR_FCR;
  assign iir_read  = reg_re && reg_addr == ADDR_IIR_FCR;
  assign lsr_read  = reg_re && reg_addr == ADDR_LSR;

  assign tx_push   = thr_write;
  assign tx_wdata  = reg_wdata;
  assign rx_pop    = rbr_read;
  assign tx_clear  = fcr_write && (fcr_w.tx_clr || fcr_w.fifo_en != fifo_en);
  assign rx_clear  = fcr_write && (fcr_w.rx_clr || fcr_w.fifo_en != fifo_en);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lcr     <= '0;
      dll     <= '0;
      dlh     <= '0;
      ier     <= '0;
      fifo_en <= 1'b0;
      rx_trig <= '0;
    end else if (reg_we) begin
      unique case (reg_addr)
        ADDR_RBR_THR_DLL: if (lcr.dlab) dll <= reg_wdata;
        ADDR_IER_DLH:     if (lcr.dlab) dlh <= reg_wdata;
                          else          ier <= ier_t'(reg_wdata[2:0]);
        ADDR_IIR_FCR: begin
          fifo_en <= fcr_w.fifo_en;
          rx_trig <= fcr_w.rx_trig;
        end
        ADDR_LCR:         lcr <= lcr_t'(reg_wdata);
        default: ;
      endcase
    end
  end

  // sticky line status bits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oe       <= 1'b0;
      pe       <= 1'b0;
      fe       <= 1'b0;
      bi       <= 1'b0;
      fifo_err <= 1'b0;
    end else begin
      oe       <= rx_overflow                                || (oe && !lsr_read);
      pe       <= (rx_push && rx_pe)                         || (pe && !lsr_read);
      fe       <= (rx_push && rx_fe)                         || (fe && !lsr_read);
      bi       <= (rx_push && rx_bi)                         || (bi && !lsr_read);
      fifo_err <= (rx_push && fifo_en && (rx_pe || rx_fe || rx_bi))
                  || (fifo_err && !lsr_read);
    end
  end

  assign lsr = {fifo_err, tx_empty && !tx_busy, tx_empty, bi, fe, pe, oe, !rx_empty};

  // receiver trigger level, limited to the FIFO depth
  always_comb begin
    unique case (rx_trig)
      2'd0: trig_level = CW'(1);
      2'd1: trig_level = CW'(4 < FIFO_DEPTH ? 4 : FIFO_DEPTH);
      2'd2: trig_level = CW'(8 < FIFO_DEPTH ? 8 : FIFO_DEPTH);
      default: trig_level = CW'(14 < FIFO_DEPTH ? 14 : FIFO_DEPTH);
    endcase
  end

  assign rls_cond = oe || pe || fe || bi;
  assign rda_cond = fifo_en ? (rx_count >= trig_level) : !rx_empty;

  // read multiplexer
  always_comb begin
    unique case (reg_addr)
      ADDR_RBR_THR_DLL: reg_rdata = lcr.dlab ? dll : rx_rdata;
      ADDR_IER_DLH:     reg_rdata = lcr.dlab ? dlh : {5'b0, ier};
      ADDR_IIR_FCR:     reg_rdata = {fifo_en, fifo_en, 2'b00, iir_id};
      ADDR_LCR:         reg_rdata = lcr;
      ADDR_LSR:         reg_rdata = lsr;
      default:          reg_rdata = 8'h00;
    endcase
  end

  // DLAB routes address 0 to the divisor latch: no FIFO traffic then
  a_dlab_no_fifo: assert property (@(posedge clk) disable iff (!rst_n)
                                   lcr.dlab |-> !(tx_push || rx_pop));

endmodule
