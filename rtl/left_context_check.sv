// left_context_check: does the rule's left context match the one or two
// characters just before the focus?
//
// Combinational.  left_text[0] is the character immediately before the
// focus and left_text[1] the one before it; the translating controller
// supplies them, carrying them over from the previous group at the start of
// a group.  Each is compared with the rule's left context using
// braille_pkg::ctx_match.  An empty left context always matches.
module left_context_check
  import braille_pkg::*;
(
  input  rule_t               rule,
  input  char_t [LEFT_MAX-1:0] left_text,
  output logic                left_ok
);
  always_comb begin
    left_ok = 1'b1;
    for (int i = 0; i < LEFT_MAX; i++)
      if (i < int'(rule.left_len) && !ctx_match(rule.left[i], left_text[i])) left_ok = 1'b0;
  end
endmodule
