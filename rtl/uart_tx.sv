// uart_tx: transmitter shift register (TSR) and framing.
//
// Takes the next character from the transmitter FIFO / holding register,
// and shifts it out on TXD as one asynchronous frame:
//   start bit (0), 5..8 data bits LSB first, optional parity bit,
//   1 or 2 stop bits (1), line idle at 1.
// Every bit lasts 16 pulses of bclk (the 16x baud clock from the baud
// rate generator), so a frame takes 16 * (1 + N + P + S) bclk pulses.
// The frame format comes from LCR (word length, stop bits, parity enable,
// even/odd and stick parity) and is latched when the character is loaded,
// so an LCR write cannot corrupt a frame in flight. LCR break control
// holds TXD at 0 while set.
// Interface: the character is taken on a bclk pulse when tx_empty is 0;
// tx_pop is then high for that one clock. When a stop bit ends and the
// FIFO holds another character the next start bit follows at once.
// busy is high from the load until the last stop bit has ended; the
// register block uses it for LSR.TEMT.
// The framing (start 0, data, optional parity, stop 1) follows the
// article. Five-bit words with two stop bits send 1.5 stop bits, as in
// the 16550; that and the rest of the timing are this design's choices.
module uart_tx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bclk,       // 16x baud enable pulse
  input  lcr_t       lcr,
  input  logic       tx_empty,   // transmitter FIFO / THR empty
  input  logic [7:0] tx_data,    // head of the transmitter FIFO
  output logic       tx_pop,     // take tx_data (one clock)
  output logic       txd,        // serial output (UARTn_TXD)
  output logic       busy        // TSR is sending a frame
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP} tx_state_e;

  tx_state_e  state;
  logic [7:0] tsr;        // transmitter shift register
  logic       par;        // parity bit of the character in the TSR
  lcr_t       fmt;        // frame format latched at load
  logic [4:0] tick;       // bclk pulses within the current bit
  logic [2:0] bitn;       // data bits already sent
  logic       line;       // TXD before break control
  logic       load;
  logic       bit_end;
  logic [4:0] stop_len;

  assign stop_len = !fmt.stb ? 5'd15 : (fmt.wls == 2'd0 ? 5'd23 : 5'd31);
  assign bit_end  = bclk && (state == S_STOP ? tick == stop_len : tick == 5'd15);
  assign load     = bclk && !tx_empty &&
                    (state == S_IDLE || (state == S_STOP && bit_end));
  assign tx_pop   = load;
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      tsr   <= '0;
      par   <= 1'b0;
      fmt   <= '0;
      tick  <= '0;
      bitn  <= '0;
      line  <= 1'b1;
    end else if (load) begin
      state <= S_START;
      tsr   <= tx_data;
      par   <= parity_bit(tx_data, lcr);
      fmt   <= lcr;
      tick  <= '0;
      bitn  <= '0;
      line  <= 1'b0;
    end else if (bclk && state != S_IDLE) begin
      tick <= bit_end ? 5'd0 : tick + 1'b1;
      if (bit_end) begin
        unique case (state)
          S_START: begin
            state <= S_DATA;
            line  <= tsr[0];
          end
          S_DATA: begin
            tsr  <= tsr >> 1;
            bitn <= bitn + 1'b1;
            if (bitn == 3'(3'd4 + fmt.wls)) begin
              state <= fmt.pen ? S_PARITY : S_STOP;
              line  <= fmt.pen ? par : 1'b1;
            end else begin
              line <= tsr[1];
            end
          end
          S_PARITY: begin
            state <= S_STOP;
            line  <= 1'b1;
          end
          S_STOP: begin
            state <= S_IDLE;
            line  <= 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // break control forces the line low
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) txd <= 1'b1;
    else        txd <= lcr.brk ? 1'b0 : line;
  end

  // handshake with the FIFO: a character is only taken when one is there,
  // and only one per frame
  a_pop_not_empty: assert property (@(posedge clk) disable iff (!rst_n) tx_pop |-> !tx_empty);
  a_pop_one_clock: assert property (@(posedge clk) disable iff (!rst_n) tx_pop |=> !tx_pop);

endmodule
