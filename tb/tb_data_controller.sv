// tb_data_controller: streams characters and checks where groups close
// (five words, line end, full buffer), the upper-case folding, the group
// contents, the handover on grp_take and the overflow report.
module tb_data_controller;
  import braille_pkg::*;
  localparam int unsigned BUF_LEN = 12;
  logic clk = 0, rst_n = 1, in_valid = 0, grp_take = 0;
  char_t in_data = 0;
  logic grp_valid, overflow;
  char_t [BUF_LEN-1:0] grp_text;
  logic [3:0] grp_len;
  int checks = 0, failures = 0, novf = 0;

  data_controller #(.BUF_LEN(BUF_LEN), .WORDS_PER_GROUP(5)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real edge, so the asynchronous reset fires
  always @(posedge clk) if (overflow) novf++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input char_t c);
    @(negedge clk); in_valid = 1; in_data = c;
    @(negedge clk); in_valid = 0;
  endtask

  task automatic put_s(input string s);
    for (int i = 0; i < s.len(); i++) put(s[i]);
  endtask

  // the group must be closed now, with text exp; then take it
  task automatic expect_group(input string exp);
    string s;
    checks++;
    if (!grp_valid) begin failures++; $display("group '%s' not closed", exp); return; end
    s = "";
    for (int i = 0; i < int'(grp_len); i++) s = {s, string'(grp_text[i])};
    checks++;
    if (s != exp) begin failures++; $display("group '%s' expected '%s'", s, exp); end
    @(negedge clk); grp_take = 1;
    @(negedge clk); grp_take = 0;
    checks++;
    if (grp_valid || grp_len != 0) begin failures++; $display("group not released"); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    put_s("a b c d ");
    checks++; if (grp_valid) begin failures++; $display("closed after four words"); end
    put_s("E ");
    expect_group("A B C D E ");
    put_s("Hi!");
    checks++; if (grp_valid) begin failures++; $display("closed early"); end
    put(8'h0A);
    expect_group({"HI!", 8'h0A});
    put_s("xyz"); put(8'h0D);
    expect_group({"XYZ", 8'h0D});
    put_s("ABCDEFGHIJKL");            // buffer full
    expect_group("ABCDEFGHIJKL");
    // bytes arriving while a closed group waits are lost
    put_s("ONE\n");
    put_s("XY");
    repeat (2) @(negedge clk);
    checks++; if (novf != 2) begin failures++; $display("overflow count %0d", novf); end
    expect_group("ONE\n");
    // a byte in the same cycle as grp_take starts the new group
    put_s("P Q\n");
    @(negedge clk); grp_take = 1; in_valid = 1; in_data = "z";
    @(negedge clk); grp_take = 0; in_valid = 0;
    put(8'h0A);
    expect_group({"Z", 8'h0A});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
