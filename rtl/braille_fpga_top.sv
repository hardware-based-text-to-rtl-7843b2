// braille_fpga_top: the translator between a serial receiver and a serial
// transmitter, as in the FPGA test setup: the host sends text over RS-232 at
// RX_BAUD, the translator converts it group by group, and the Braille ASCII
// result goes back at TX_BAUD.  The baud rates (4800 in, 57600 out) and the
// five-word group follow the description; the 100 MHz clock, the 64-character
// buffer and the 8N1 frame are this design's choices.
//
// Status outputs: busy (a group is being translated or sent), in_overflow (a
// received byte was lost), out_overflow (an output code was lost) and
// frame_err (a received frame had a low stop bit); all are one-cycle pulses
// except busy.
module braille_fpga_top #(
  parameter int unsigned CLK_FREQ_HZ     = 100_000_000,
  parameter int unsigned RX_BAUD         = 4800,
  parameter int unsigned TX_BAUD         = 57600,
  parameter int unsigned BUF_LEN         = 64,
  parameter int unsigned WORDS_PER_GROUP = 5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rxd,
  output logic txd,
  output logic busy,
  output logic in_overflow,
  output logic out_overflow,
  output logic frame_err
);
  localparam int unsigned RX_CPB = (CLK_FREQ_HZ + RX_BAUD / 2) / RX_BAUD;
  localparam int unsigned TX_CPB = (CLK_FREQ_HZ + TX_BAUD / 2) / TX_BAUD;

  logic       rx_valid, tx_valid, tx_ready;
  logic [7:0] rx_data, tx_data;

  uart_rx #(.CLKS_PER_BIT(RX_CPB)) u_rx (
    .clk, .rst_n, .rxd, .rx_valid, .rx_data, .frame_err);

  translator #(.BUF_LEN(BUF_LEN), .WORDS_PER_GROUP(WORDS_PER_GROUP)) u_tr (
    .clk, .rst_n, .in_valid(rx_valid), .in_data(rx_data),
    .out_valid(tx_valid), .out_data(tx_data), .out_ready(tx_ready),
    .busy, .in_overflow, .out_overflow);

  uart_tx #(.CLKS_PER_BIT(TX_CPB)) u_tx (
    .clk, .rst_n, .tx_valid, .tx_data, .tx_ready, .txd);
endmodule
