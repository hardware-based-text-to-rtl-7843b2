// uart_tx: serial transmitter, 8N1, least significant bit first, line idle
// high.
//
// Sends the translated Braille ASCII codes back to the host.  The
// transmitter follows the test setup's description; the frame format and the
// handshake are this design's choices.  A byte is accepted when tx_valid and
// tx_ready are both high; the frame (start bit, 8 data bits, stop bit) then
// takes 10 * CLKS_PER_BIT cycles, during which tx_ready is low.
// The assertion below samples rst_n in its disable clause, so lint reports
// rst_n as used both asynchronously and synchronously; that is intended.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 1736  // 100 MHz / 57600 baud
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tx_valid,
  input  logic [7:0] tx_data,
  output logic       tx_ready,
  output logic       txd
);
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic          busy;
  logic [CW-1:0] cnt;
  logic [3:0]    bit_idx;   // 0 start, 1..8 data, 9 stop
  logic [9:0]    frame;

  assign tx_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cnt     <= '0;
      bit_idx <= '0;
      frame   <= '1;
      txd     <= 1'b1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (tx_valid) begin
        busy    <= 1'b1;
        frame   <= {1'b1, tx_data, 1'b0};
        txd     <= 1'b0;
        bit_idx <= '0;
        cnt     <= CW'(CLKS_PER_BIT - 1);
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end else if (bit_idx == 4'd9) begin
      busy <= 1'b0;
      txd  <= 1'b1;
    end else begin
      bit_idx <= bit_idx + 1'b1;
      txd     <= frame[bit_idx + 4'd1];
      cnt     <= CW'(CLKS_PER_BIT - 1);
    end
  end

  // A byte offered must stay put until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (tx_valid && !tx_ready) |=> (tx_valid && $stable(tx_data));
  endproperty
  a_hold: assert property (p_hold);
endmodule
