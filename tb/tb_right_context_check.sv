// tb_right_context_check: right contexts with the boundary class, the
// letter class and literals, at the group end and inside it, with
// hand-worked expectations.
module tb_right_context_check;
  import braille_pkg::*;
  localparam int unsigned BUF_LEN = 16;
  rule_t rule;
  char_t [BUF_LEN-1:0] text;
  logic [4:0] len;
  logic [4:0] focus_end;
  logic right_ok;
  int checks = 0, failures = 0;

  right_context_check #(.BUF_LEN(BUF_LEN)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_text(input string s);
    text = '0;
    for (int i = 0; i < s.len(); i++) text[i] = s[i];
    len = 5'(s.len());
  endtask

  task automatic t(input rule_t r, input int fe, input logic exp);
    rule = r; focus_end = 5'(fe); #1;
    checks++;
    if (right_ok != exp) begin
      failures++;
      $display("focus_end %0d: ok %b expected %b", fe, right_ok, exp);
    end
  endtask

  initial begin
    set_text("DO DOG SO.");
    t(mk("~", "DO", "~", "D"), 2, 1);    // followed by space
    t(mk("~", "DO", "~", "D"), 5, 0);    // followed by G
    t(mk("", "D", "!", "D"), 4, 1);      // O is a letter
    t(mk("", "D", "!", "D"), 2, 0);
    t(mk("~", "SO", "~", "S"), 9, 1);    // followed by '.'
    t(mk("", "S", "O.", "S"), 8, 1);     // two literal characters
    t(mk("", "S", "O,", "S"), 8, 0);
    t(mk("", "S", "", "S"), 5, 1);       // empty context
    t(mk("~", "SO", "~", "S"), 10, 1);   // past the end reads as a boundary
    t(mk("", "S", "!~", "S"), 9, 0);     // '.' is not a letter
    set_text("EAR");
    t(mk("!", "EA", "!", "1"), 2, 1);
    t(mk("!", "EAR", "!", "1"), 3, 0);   // end of group is not a letter
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
