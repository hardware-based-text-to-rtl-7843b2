// right_context_check: does the rule's right context match the text that
// follows the focus?
//
// Combinational.  Right-context character i is compared with text character
// focus_end+i using braille_pkg::ctx_match ('~' any non-letter, '!' any
// letter, otherwise the literal character).  Beyond the end of the group the
// text reads as a space, i.e. a word boundary.  An empty right context always
// matches.
module right_context_check
  import braille_pkg::*;
#(
  parameter int unsigned BUF_LEN = 64
) (
  input  rule_t                                  rule,
  input  char_t [BUF_LEN-1:0]                    text,
  input  logic [$clog2(BUF_LEN+1)-1:0]           len,
  input  logic [$clog2(BUF_LEN+FOCUS_MAX+1)-1:0] focus_end,
  output logic                                   right_ok
);
  localparam int unsigned EW = $clog2(BUF_LEN + FOCUS_MAX + RIGHT_MAX + 1);

  always_comb begin
    logic [EW-1:0] idx;
    char_t         c;
    right_ok = 1'b1;
    for (int i = 0; i < RIGHT_MAX; i++) begin
      idx = EW'(focus_end) + EW'(i);
      c   = (idx < EW'(len)) ? text[idx] : CH_SPACE;
      if (i < int'(rule.right_len) && !ctx_match(rule.right[i], c)) right_ok = 1'b0;
    end
  end
endmodule
