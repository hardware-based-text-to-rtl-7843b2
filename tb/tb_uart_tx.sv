// tb_uart_tx: offers random bytes and decodes the serial line with an
// independent bit sampler; checks every byte, the idle level, and that one
// frame takes exactly 10 bit periods (tx_ready low for 10*CLKS_PER_BIT).
module tb_uart_tx;
  localparam int unsigned CPB = 12;
  logic clk = 0, rst_n = 1, tx_valid = 0, tx_ready, txd;
  logic [7:0] tx_data = 0;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real edge, so the asynchronous reset fires

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    checks++;
    if (txd !== 1'b1 || !tx_ready) begin failures++; $display("not idle after reset"); end
    for (int k = 0; k < 30; k++) begin
      logic [7:0] b, got;
      int busy_cycles;
      b = 8'($urandom);
      @(negedge clk); tx_valid = 1; tx_data = b;
      @(posedge clk); #1 tx_valid = 0;
      // wait for start bit, then sample each bit mid-period
      while (txd) @(posedge clk);
      repeat (CPB / 2) @(posedge clk);
      checks++;
      if (txd !== 1'b0) begin failures++; $display("bad start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        got[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (txd !== 1'b1) begin failures++; $display("bad stop bit"); end
      checks++;
      if (got != b) begin failures++; $display("sent %h decoded %h", b, got); end
      busy_cycles = 0;
      while (!tx_ready) begin @(posedge clk); busy_cycles++; end
      checks++;
      // ready returned about half a bit after the stop-bit sample point
      if (busy_cycles > CPB) begin failures++; $display("frame too long"); end
    end
    // exact frame length
    begin
      int n;
      @(negedge clk); tx_valid = 1; tx_data = 8'h3C;
      @(posedge clk); #1 tx_valid = 0;
      n = 0;
      while (!tx_ready) begin @(posedge clk); #1; n++; end
      checks++;
      if (n != 10 * CPB) begin failures++; $display("frame length %0d, expected %0d", n, 10*CPB); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
