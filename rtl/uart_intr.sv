// uart_intr: interrupt control of the UART (IER gating, IIR identification).
//
// Three interrupt sources are recognised, in falling priority:
//   RLS  receiver line status: overrun, parity, framing error or break
//        is flagged in LSR (cleared by reading LSR),
//   RDA  received data available: the receiver FIFO holds at least the
//        trigger level (FIFO mode) or one character (character mode),
//   THRE transmitter holding register empty.
// Each source passes only when its IER enable bit is set; the highest one
// that passes is reported as the IIR identification code, and irq is high
// while any passes. RLS and RDA follow their conditions directly. THRE is
// an event: it is raised when the transmitter FIFO becomes empty (or when
// its enable is switched on while it is empty) and dropped by a write to
// THR (which takes precedence, since it refills the FIFO) or by a read of
// IIR that reported it.
// The article gives the function (IER enables each interrupt, IIR
// identifies the enabled ones, both go to the CPU); the sources, their
// priority and the IIR codes are the 16550's and this design's choice.
// The 16550's modem-status and character-timeout interrupts are not part
// of this design. Outputs are combinational from the registered pending
// state, in the same clock as the conditions.
module uart_intr
  import uart_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  ier_t    ier,
  input  logic    rls_cond,    // LSR error bits set
  input  logic    rda_cond,    // receive data ready / trigger level reached
  input  logic    thr_empty,   // transmitter FIFO / THR empty
  input  logic    thr_write,   // THR written this clock
  input  logic    iir_read,    // IIR read this clock
  output iir_id_e iir_id,
  output logic    irq
);

  logic thre_pend;
  logic thr_empty_q;
  logic ethre_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thre_pend   <= 1'b0;
      thr_empty_q <= 1'b1;
      ethre_q     <= 1'b0;
    end else begin
      thr_empty_q <= thr_empty;
      ethre_q     <= ier.ethre;
      // a THR write refills the FIFO, so it wins over a late edge
      if (thr_write)
        thre_pend <= 1'b0;
      else if ((thr_empty && !thr_empty_q) || (ier.ethre && !ethre_q && thr_empty))
        thre_pend <= 1'b1;
      else if (iir_read && iir_id == IIR_THRE)
        thre_pend <= 1'b0;
    end
  end

  always_comb begin
    if (ier.erls && rls_cond)         iir_id = IIR_RLS;
    else if (ier.erbi && rda_cond)    iir_id = IIR_RDA;
    else if (ier.ethre && thre_pend)  iir_id = IIR_THRE;
    else                              iir_id = IIR_NONE;
  end

  assign irq = (iir_id != IIR_NONE);

endmodule
