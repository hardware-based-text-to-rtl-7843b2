// tb_find_entry: looks up every character class of interest and compares the
// entry address (or fail) with the first rule of each group in the table as
// written out by hand; checks the one-cycle latency.
module tb_find_entry;
  import braille_pkg::*;
  logic clk = 0, rst_n = 1, step_req = 0;
  char_t step_char = 0;
  logic entry_valid, entry_fail;
  rule_addr_t entry_addr;
  char_t entry_char;
  int checks = 0, failures = 0;

  find_entry dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real edge, so the asynchronous reset fires

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic look(input char_t c, input logic fail, input int addr);
    @(negedge clk); step_req = 1; step_char = c;
    @(negedge clk); step_req = 0;
    checks++;
    if (!entry_valid || entry_fail != fail || (!fail && entry_addr != rule_addr_t'(addr)) || entry_char != c) begin
      failures++;
      $display("'%c': valid %b fail %b addr %0d, expected fail %b addr %0d", c, entry_valid, entry_fail, entry_addr, fail, addr);
    end
    @(negedge clk);
    checks++;
    if (entry_valid) begin failures++; $display("entry_valid longer than one cycle"); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    look("A", 0, 0);  look("B", 0, 4);  look("C", 0, 7);  look("E", 0, 13);
    look("I", 0, 28); look("K", 0, 33); look("O", 0, 40); look("S", 0, 50);
    look("T", 0, 54); look("W", 0, 62); look("Y", 0, 66);
    look("X", 1, 0);  look("Z", 1, 0);  look(" ", 1, 0);  look("7", 1, 0);
    look(",", 1, 0);  look("a", 1, 0);  look(8'h0A, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
