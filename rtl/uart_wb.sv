// uart_wb: Wishbone slave interface of the UART.
//
// Turns classic Wishbone single cycles (8-bit data, 3-bit byte address)
// into one-clock register strobes for the register block:
//   - in the first clock of a cycle (cyc & stb, no ack yet) reg_we or
//     reg_re is high for exactly one clock, with reg_addr / reg_wdata,
//   - at that edge the read data is captured and wb_ack_o rises, so every
//     access takes two clocks and ack is high for one.
// Because the strobe is a single clock, registers with read side effects
// (RBR pops the receiver FIFO, LSR clears its error bits, IIR clears the
// THRE interrupt) act once per bus access.
// The article names the Wishbone bus as the host interface of the UART
// and nothing more; the 8-bit data width, the one-wait-state timing and
// the absence of byte selects and error/retry signals are this design's
// choices.
module uart_wb #(
  parameter int unsigned AW = 3,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // Wishbone slave
  input  logic          wb_cyc_i,
  input  logic          wb_stb_i,
  input  logic          wb_we_i,
  input  logic [AW-1:0] wb_adr_i,
  input  logic [DW-1:0] wb_dat_i,
  output logic [DW-1:0] wb_dat_o,
  output logic          wb_ack_o,
  // register block side
  output logic          reg_we,
  output logic          reg_re,
  output logic [AW-1:0] reg_addr,
  output logic [DW-1:0] reg_wdata,
  input  logic [DW-1:0] reg_rdata
);

  logic access;

  assign access    = wb_cyc_i && wb_stb_i && !wb_ack_o;
  assign reg_we    = access && wb_we_i;
  assign reg_re    = access && !wb_we_i;
  assign reg_addr  = wb_adr_i;
  assign reg_wdata = wb_dat_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_ack_o <= 1'b0;
      wb_dat_o <= '0;
    end else begin
      wb_ack_o <= access;
      if (reg_re) wb_dat_o <= reg_rdata;
    end
  end

  // Wishbone rule: ack only answers an active strobe
  a_ack_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
                                   wb_ack_o |-> $past(wb_cyc_i && wb_stb_i));

  // register strobes are exclusive and last one clock per access
  a_strobe_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(reg_we && reg_re));
  a_strobe_one_clock: assert property (@(posedge clk) disable iff (!rst_n)
                                       (reg_we || reg_re) |=> !(reg_we || reg_re));

endmodule
