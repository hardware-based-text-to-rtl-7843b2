// tb_uart_rx: sends random bytes as 8N1 frames and checks each received
// byte, the frame timing (valid within one bit period after the stop bit's
// middle) and the frame-error report on a low stop bit.
module tb_uart_rx;
  localparam int unsigned CPB = 16;
  logic clk = 0, rst_n = 1, rxd = 1;
  logic rx_valid, frame_err;
  logic [7:0] rx_data;
  int checks = 0, failures = 0;
  int nvalid = 0, nerr = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real edge, so the asynchronous reset fires

  always @(posedge clk) begin
    if (rx_valid) begin nvalid++; last = rx_data; end
    if (frame_err) nerr++;
  end

  task automatic send(input logic [7:0] b, input logic stop);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = stop; repeat (CPB) @(posedge clk);
    rxd = 1; repeat (CPB) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      logic [7:0] b;
      int n0;
      b = 8'($urandom);
      n0 = nvalid;
      send(b, 1'b1);
      checks++;
      if (nvalid != n0 + 1 || last != b) begin
        failures++;
        $display("byte %0d: sent %h got %h (valid count %0d)", k, b, last, nvalid - n0);
      end
    end
    begin
      int n0;
      n0 = nvalid;
      send(8'hA5, 1'b0);
      checks++;
      if (nerr != 1 || nvalid != n0) begin failures++; $display("frame error not reported"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
