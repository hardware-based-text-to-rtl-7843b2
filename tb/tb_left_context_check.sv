// tb_left_context_check: one- and two-character left contexts with the
// boundary class, the letter class and literals.
module tb_left_context_check;
  import braille_pkg::*;
  rule_t rule;
  char_t [LEFT_MAX-1:0] left_text;
  logic left_ok;
  int checks = 0, failures = 0;

  left_context_check dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // l1: character just before the focus, l2: the one before it
  task automatic t(input rule_t r, input char_t l2, input char_t l1, input logic exp);
    rule = r; left_text[0] = l1; left_text[1] = l2; #1;
    checks++;
    if (left_ok != exp) begin
      failures++;
      $display("'%c%c': ok %b expected %b", l2, l1, left_ok, exp);
    end
  endtask

  initial begin
    t(mk("~", "BUT", "~", "B"), "A", " ", 1);
    t(mk("~", "BUT", "~", "B"), " ", "A", 0);
    t(mk("~", "BUT", "~", "B"), "A", 8'h0A, 1);
    t(mk("!", "ING", "", "+"), " ", "S", 1);
    t(mk("!", "ING", "", "+"), "S", "'", 0);
    t(mk("", "A", "", "A"), "1", "2", 1);
    t(mk("!!", "X", "", "X"), "A", "B", 1);
    t(mk("!!", "X", "", "X"), " ", "B", 0);
    t(mk("~!", "X", "", "X"), " ", "B", 1);
    t(mk("~!", "X", "", "X"), "B", " ", 0);
    t(mk("QU", "X", "", "X"), "Q", "U", 1);
    t(mk("QU", "X", "", "X"), "U", "Q", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
