// uart_rx: serial receiver, 8 data bits, no parity, one stop bit (8N1),
// least significant bit first, line idle high.
//
// Converts the RS-232 text stream from the host into bytes for the
// translator.  The receiver itself follows the test setup's description; the
// frame format and the sampling scheme are this design's choices.  The line
// is synchronised through two flip-flops.  A falling edge starts a frame; the
// start bit is re-checked half a bit later and every following bit is
// sampled in the middle of its bit period, CLKS_PER_BIT clock cycles apart.
//
// Interface: rx_valid pulses for one cycle with rx_data when a frame whose
// stop bit is high has been received, half a bit period after the middle of
// the stop bit starts.  A low stop bit drops the byte and pulses frame_err.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 20834  // 100 MHz / 4800 baud
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  output logic       frame_err
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_t;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  state_t        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;
  logic [1:0]    sync;

  wire line = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      bit_idx   <= '0;
      shreg     <= '0;
      sync      <= 2'b11;
      rx_valid  <= 1'b0;
      rx_data   <= '0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      rx_valid  <= 1'b0;
      frame_err <= 1'b0;
      case (state)
        S_IDLE: if (!line) begin
          state <= S_START;
          cnt   <= CW'(CLKS_PER_BIT / 2);
        end
        S_START: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else if (line) state <= S_IDLE;        // glitch, not a start bit
          else begin
            state   <= S_DATA;
            cnt     <= CW'(CLKS_PER_BIT - 1);
            bit_idx <= '0;
          end
        end
        S_DATA: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            shreg <= {line, shreg[7:1]};
            cnt   <= CW'(CLKS_PER_BIT - 1);
            if (bit_idx == 3'd7) state <= S_STOP;
            else bit_idx <= bit_idx + 1'b1;
          end
        end
        S_STOP: begin
          if (cnt != 0) cnt <= cnt - 1'b1;
          else begin
            state <= S_IDLE;
            if (line) begin
              rx_valid <= 1'b1;
              rx_data  <= shreg;
            end else begin
              frame_err <= 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
