// uart_rx: receiver shift register (RSR), de-framing and error checks.
//
// Watches the serial input UARTn_RXD, finds each frame and delivers the
// character, without its start, parity and stop bits, to the receiver
// FIFO together with its error flags.
// How it works: RXD passes through a two-flop synchroniser. In idle, the
// first bclk pulse (16x baud) that sees the line low marks a possible
// start bit; eight pulses later, in the middle of the start bit, the line
// is sampled again and a high level is rejected as noise. From there every
// 16th pulse samples the middle of one bit: 5..8 data bits (LSB first,
// shifted into the RSR), the parity bit when LCR enables it, and the
// first stop bit.
// At the stop-bit sample rx_push is high for one clock with
//   rx_data  the character, right-aligned,
//   rx_pe    parity error (received parity differs from the LCR rule),
//   rx_fe    framing error (stop bit sampled as 0),
//   rx_bi    break (data, parity and stop bits all 0; the character is 0,
//            rx_fe is set with it and rx_pe is not).
// After a framing error or break the receiver waits for the line to go
// back high before it looks for the next start bit.
// The framing and the parity check follow the article; the 16x
// mid-bit sampling, the noise rejection of the start bit and the
// behaviour after a framing error are this design's (16550-style) choices.
module uart_rx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bclk,      // 16x baud enable pulse
  input  lcr_t       lcr,
  input  logic       rxd,       // serial input (UARTn_RXD), asynchronous
  output logic       rx_push,   // character complete (one clock)
  output logic [7:0] rx_data,
  output logic       rx_pe,
  output logic       rx_fe,
  output logic       rx_bi,
  output logic       busy       // a frame is being received
);

  typedef enum logic [2:0] {S_IDLE, S_START, S_DATA, S_PARITY, S_STOP, S_WAIT_HIGH} rx_state_e;

  rx_state_e  state;
  logic [1:0] sync;
  logic       rx_s;        // synchronised RXD
  logic [7:0] rsr;         // receiver shift register
  logic       par_rx;      // received parity bit
  logic       all_zero;    // every sampled bit so far was 0
  logic [3:0] tick;
  logic [2:0] bitn;
  lcr_t       fmt;         // frame format latched at the start bit
  logic       sample;      // middle of the current bit
  logic [7:0] data_al;

  assign rx_s    = sync[1];
  assign sample  = bclk && (state == S_START ? tick == 4'd7 : tick == 4'd15);
  assign data_al = rsr >> (2'd3 - fmt.wls);
  assign busy    = (state != S_IDLE) && (state != S_WAIT_HIGH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], rxd};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      rsr      <= '0;
      par_rx   <= 1'b0;
      all_zero <= 1'b1;
      tick     <= '0;
      bitn     <= '0;
      fmt      <= '0;
      rx_push  <= 1'b0;
      rx_data  <= '0;
      rx_pe    <= 1'b0;
      rx_fe    <= 1'b0;
      rx_bi    <= 1'b0;
    end else begin
      rx_push <= 1'b0;
      if (bclk) tick <= sample ? 4'd0 : tick + 1'b1;
      unique case (state)
        S_IDLE: begin
          tick <= '0;
          if (bclk && !rx_s) begin
            state    <= S_START;
            fmt      <= lcr;
            rsr      <= '0;
            bitn     <= '0;
            all_zero <= 1'b1;
          end
        end
        S_START: if (sample) state <= rx_s ? S_IDLE : S_DATA;
        S_DATA: if (sample) begin
          rsr      <= {rx_s, rsr[7:1]};
          all_zero <= all_zero & !rx_s;
          bitn     <= bitn + 1'b1;
          if (bitn == 3'(3'd4 + fmt.wls)) state <= fmt.pen ? S_PARITY : S_STOP;
        end
        S_PARITY: if (sample) begin
          par_rx   <= rx_s;
          all_zero <= all_zero & !rx_s;
          state    <= S_STOP;
        end
        S_STOP: if (sample) begin
          rx_push <= 1'b1;
          rx_data <= data_al;
          rx_pe   <= fmt.pen && !(all_zero && !rx_s) && (par_rx != parity_bit(data_al, fmt));
          rx_fe   <= !rx_s;
          rx_bi   <= all_zero && !rx_s;
          state   <= rx_s ? S_IDLE : S_WAIT_HIGH;
        end
        S_WAIT_HIGH: if (rx_s) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // a character is delivered for one clock, and only when a frame ends
  a_push_one_clock: assert property (@(posedge clk) disable iff (!rst_n) rx_push |=> !rx_push);
  a_push_after_stop: assert property (@(posedge clk) disable iff (!rst_n)
                                      rx_push |-> $past(state == S_STOP));

endmodule
