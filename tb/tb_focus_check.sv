// tb_focus_check: applies rules and text positions with hand-worked
// results: full matches, a mismatch in the last focus character, a focus
// running past the end of the group, and the focus end position.
module tb_focus_check;
  import braille_pkg::*;
  localparam int unsigned BUF_LEN = 16;
  rule_t rule;
  char_t [BUF_LEN-1:0] text;
  logic [4:0] len, pos;
  logic focus_ok;
  logic [4:0] focus_end;
  int checks = 0, failures = 0;

  focus_check #(.BUF_LEN(BUF_LEN)) dut (.*);

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

  task automatic t(input rule_t r, input int p, input logic exp_ok, input int exp_end);
    rule = r; pos = 5'(p); #1;
    checks++;
    if (focus_ok != exp_ok || focus_end != 5'(exp_end)) begin
      failures++;
      $display("pos %0d: ok %b end %0d, expected %b %0d", p, focus_ok, focus_end, exp_ok, exp_end);
    end
  endtask

  initial begin
    set_text("THE CAT THAT");
    t(mk("", "THE", "", "!"), 0, 1, 3);
    t(mk("", "THE", "", "!"), 8, 0, 11);   // THA
    t(mk("~", "THAT", "~", "T"), 8, 1, 12);
    t(mk("", "TH", "", "?"), 8, 1, 10);
    t(mk("", "CAN", "", "C"), 4, 0, 7);    // CAT
    t(mk("", "C", "", "C"), 4, 1, 5);
    t(mk("", "A", "", "A"), 5, 1, 6);
    t(mk("", "A", "", "A"), 6, 0, 7);
    set_text("THA");
    t(mk("~", "THAT", "~", "T"), 0, 0, 4); // runs past the group
    t(mk("", "THA", "", "T"), 0, 1, 3);
    set_text("PEOPLE ");
    t(mk("~", "PEOPLE", "~", "P"), 0, 1, 6);
    t(mk("", "EOPLE ", "", "P"), 1, 1, 7);
    t(mk("", "EOPLEX", "", "P"), 1, 0, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
