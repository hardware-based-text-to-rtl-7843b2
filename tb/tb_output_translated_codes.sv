// tb_output_translated_codes: writes groups of codes (one and two per
// write), ends each group and drains the output under a random ready,
// checking order, completeness, busy and the overflow report.
module tb_output_translated_codes;
  import braille_pkg::*;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst_n = 1, wr_en = 0, group_done = 0, out_ready = 0;
  char_t [OUT_MAX-1:0] wr_codes = '0;
  logic [1:0] wr_cnt = 0;
  logic busy, out_valid, overflow;
  char_t out_data;
  int checks = 0, failures = 0, novf = 0;
  char_t got[$];

  output_translated_codes #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real edge, so the asynchronous reset fires

  always @(posedge clk) begin
    if (out_valid && out_ready) got.push_back(out_data);
    if (overflow) novf++;
    out_ready <= ($urandom % 3) != 0;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input char_t a, input char_t b, input int n);
    @(negedge clk); wr_en = 1; wr_codes[0] = a; wr_codes[1] = b; wr_cnt = 2'(n);
    @(negedge clk); wr_en = 0;
  endtask

  task automatic finish_group(input string exp);
    string s;
    @(negedge clk); group_done = 1;
    @(negedge clk); group_done = 0;
    checks++;
    if (!busy && exp.len() > 0) begin failures++; $display("not busy while sending"); end
    while (busy) @(negedge clk);
    s = "";
    foreach (got[i]) s = {s, string'(got[i])};
    got.delete();
    checks++;
    if (s != exp) begin failures++; $display("sent '%s' expected '%s'", s, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    wr("!", 0, 1); wr(" ", 0, 1); wr("C", "A", 2); wr("T", 0, 1);
    finish_group("! CAT");
    wr("B", 0, 1); wr("X", "Y", 2);
    finish_group("BXY");
    finish_group("");   // empty group
    for (int i = 0; i < 5; i++) wr(char_t'("a" + 2*i), char_t'("b" + 2*i), 2);  // 10 codes into 8 slots
    finish_group("abcdefgh");
    checks++;
    if (novf == 0) begin failures++; $display("overflow not reported"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
