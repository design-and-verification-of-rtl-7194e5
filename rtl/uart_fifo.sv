// uart_fifo: synchronous FIFO used as the transmitter FIFO and the
// receiver FIFO of the UART.
//
// A circular buffer of DEPTH words of WIDTH bits with a read and a write
// pointer and an occupancy count. The head word is always visible on
// rdata (first-word fall-through); pop removes it. push writes wdata when
// the FIFO is not full; a push into a full FIFO is dropped and flagged on
// `overflow` for one clock (the receiver uses this as overrun). clear
// empties the FIFO in one clock (FCR clear bits).
// When fifo_en is 0 the FIFO behaves as a single holding register: it is
// full as soon as it holds one word. This is how the UART works in its
// non-FIFO (character) mode, with FCR[0] = 0.
// The article says the UART has transmitter and receiver FIFOs that FCR
// enables and clears; their depth is not given. DEPTH = 16 is the 16550
// depth and is this design's choice, as are fall-through reads and the
// one-word mode. Push and pop in the same clock are both served.
module uart_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       fifo_en,   // 0: one-word holding register
  input  logic                       clear,     // empty the FIFO
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rdata,     // head word, valid when !empty
  output logic                       empty,
  output logic                       full,
  output logic                       overflow,  // push refused this clock
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign empty    = (count == '0);
  assign full     = fifo_en ? (count == CW'(DEPTH)) : !empty;
  assign do_pop   = pop && !empty;
  // a pop in the same clock makes room in the one-word mode
  assign do_push  = push && (!full || do_pop);
  assign rdata    = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && !do_push;
      if (do_push) wptr <= next_ptr(wptr);
      if (do_pop)  rptr <= next_ptr(rptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // storage: no reset needed, only words that were written are read
  always_ff @(posedge clk) begin
    if (do_push && !clear) mem[wptr] <= wdata;
  end

  // the count never exceeds the depth
  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));

endmodule
