// tb_translator: streams text bytes (mixed case) into the translator and
// compares the Braille ASCII stream with hand-worked translations.  Covers
// groups closed by the fifth word, by a line end and by a full buffer, and
// a byte lost (in_overflow) while the output is held back.
module tb_translator;
  import braille_pkg::*;
  logic clk = 0, rst_n = 1, in_valid = 0, out_ready = 1;
  char_t in_data = 0;
  logic out_valid, busy, in_overflow, out_overflow;
  char_t out_data;
  logic hold = 0;
  int checks = 0, failures = 0, n_inovf = 0, n_outovf = 0;
  int n_words = 0, n_line = 0, n_full = 0;
  char_t got[$];

  translator dut (.*);

  always #5 clk = ~clk;
  initial #2 rst_n = 0;   // a real edge, so the asynchronous reset fires

  always @(posedge clk) begin
    out_ready <= !hold && (($urandom % 3) != 0);
    if (out_valid && out_ready) got.push_back(out_data);
    if (in_overflow) n_inovf++;
    if (out_overflow) n_outovf++;
    if (dut.grp_take) begin
      if (dut.grp_len == 64) n_full++;
      else if (dut.grp_text[dut.grp_len - 1] == " ") n_words++;
      else n_line++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input string s);
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk); in_valid = 1; in_data = s[i];
      @(negedge clk); in_valid = 0;
      repeat (3) @(negedge clk);
    end
  endtask

  task automatic expect_out(input string exp);
    string r;
    int w;
    w = 0;
    while (got.size() < exp.len() && w < 20000) begin @(negedge clk); w++; end
    repeat (50) @(negedge clk);
    r = "";
    foreach (got[i]) r = {r, string'(got[i])};
    got.delete();
    checks++;
    if (r != exp) begin failures++; $display("got '%s'\nexpected '%s'", r, exp); end
  endtask

  initial begin
    string a70, e70;
    repeat (2) @(posedge clk); rst_n = 1;
    send("The cat and the dog ");
    expect_out("! CAT & ! DOG ");
    send("sat.\nBut it is so\n");
    expect_out("SAT.\nB X IS S\n");
    a70 = ""; e70 = "";
    for (int i = 0; i < 70; i++) begin a70 = {a70, "a"}; e70 = {e70, "A"}; end
    send({a70, "\n"});
    expect_out({e70, "\n"});
    // output held back: the second group waits, a third byte is lost
    hold = 1;
    send("A B C D E ");
    send("F G H I J ");
    send("K");
    repeat (20) @(negedge clk);
    checks++;
    if (n_inovf != 1) begin failures++; $display("in_overflow count %0d", n_inovf); end
    hold = 0;
    repeat (300) @(negedge clk);
    send("\n");
    expect_out("A B C D E F G H I J \n");
    checks++;
    if (n_words == 0 || n_line == 0 || n_full == 0 || n_outovf != 0) begin
      failures++;
      $display("groups: words %0d line %0d full %0d, out overflow %0d", n_words, n_line, n_full, n_outovf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
