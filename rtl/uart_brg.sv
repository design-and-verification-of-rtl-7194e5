// uart_brg: programmable baud rate generator.
//
// Divides the system clock by the 16-bit divisor held in the divisor latch
// (DLH:DLL) and emits a one-clock enable pulse, the baud clock BCLK, once
// every `divisor` clocks. BCLK runs at sixteen times the baud rate, so one
// serial bit lasts sixteen BCLK pulses, as the article specifies:
//   baud = f_clk / (16 * divisor).
// A divisor of 0 stops the generator (no pulses). When the divisor is
// written the count restarts, so the first pulse after a change comes
// exactly `divisor` clocks after the new value appears.
// The article gives the function (clock / divisor latch -> 16x clock);
// the down-counter, the restart on change and the meaning of divisor 0
// are this design's choices. The pulse is registered (no combinational
// path from the divisor to bclk).
module uart_brg #(
  parameter int unsigned DIV_W = 16   // width of the divisor latch (DLH:DLL)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] divisor,   // from DLH:DLL
  output logic             bclk       // 1-clock pulse at 16 x baud rate
);

  logic [DIV_W-1:0] cnt;
  logic [DIV_W-1:0] div_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      div_q <= '0;
      bclk  <= 1'b0;
    end else begin
      div_q <= divisor;
      bclk  <= 1'b0;
      if (divisor == '0) begin
        cnt <= '0;
      end else if (divisor != div_q) begin
        // new divisor: restart the count
        cnt <= divisor - 1'b1;
      end else if (cnt == '0) begin
        cnt  <= divisor - 1'b1;
        bclk <= 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  // a stopped generator (divisor 0) never pulses
  a_stopped: assert property (@(posedge clk) disable iff (!rst_n) (divisor == '0) |=> !bclk);

endmodule
